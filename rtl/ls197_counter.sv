// ls197_counter: the 74LS197 4-bit binary (hexadecimal) counter.
// CLR' low clears the count asynchronously; LOAD' low copies d into the
// counter; otherwise the count rises by one, wrapping 15 -> 0, on every
// cycle of clk in which cnt_en is high. The real part is a ripple counter
// clocked on its falling edge; here that edge is a one-cycle cnt_en pulse
// on the system clock. Q = {QD, QC, QB, QA}.
module ls197_counter (
  input  logic       clk,
  input  logic       clr_n,
  input  logic       load_n,
  input  logic [3:0] d,
  input  logic       cnt_en,
  output logic [3:0] q
);
  always_ff @(posedge clk or negedge clr_n) begin
    if (!clr_n)       q <= '0;
    else if (!load_n) q <= d;
    else if (cnt_en)  q <= q + 4'd1;
  end
endmodule
