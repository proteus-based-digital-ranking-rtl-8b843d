// jk_ff: one falling-edge JK flip-flop with direct set and clear.
// Function (per the flip-flop's function table): SD' low forces Q=1, CD' low
// forces Q=0, both asynchronously; otherwise at a falling edge of CP,
// J K = 00 holds, 01 clears, 10 sets and 11 toggles. Q' is always ~Q.
// In this design the falling edge of CP is not a clock of its own: the
// caller detects it and pulses cp_fall for one cycle of the system clock
// clk, so the whole design runs in a single clock domain. If SD' and CD'
// are both low, set wins (a case the table leaves open).
module jk_ff (
  input  logic clk,
  input  logic sd_n,
  input  logic cd_n,
  input  logic cp_fall,
  input  logic j,
  input  logic k,
  output logic q,
  output logic q_n
);
  always_ff @(posedge clk or negedge sd_n or negedge cd_n) begin
    if (!sd_n)       q <= 1'b1;
    else if (!cd_n)  q <= 1'b0;
    else if (cp_fall) begin
      unique case ({j, k})
        2'b00: q <= q;
        2'b01: q <= 1'b0;
        2'b10: q <= 1'b1;
        2'b11: q <= ~q;
      endcase
    end
  end
  assign q_n = ~q;
endmodule
