// rank_display: dynamic-scan driver for the four-digit seven-segment tube.
// A 74LS197 counter advances at SCAN_HZ (10 kHz) and its low three bits
// X = 0..7 drive both a 74LS138 decoder and the select inputs of three
// 74LS251 selectors. For X = 1..N_LANES, decoder output Y[X] lights digit X
// counted from the right, and the selectors pick bit a0, a1, a2 of register
// group X (group 1 = newest) into the A, B, C inputs of a 74LS48 whose
// input D is tied low. The decoder output lights that lane number on the
// lit digit. For X = 0 and X > N_LANES no digit is lit and the selectors
// see their grounded inputs. Each digit is thus lit one scan step in
// eight; the eye merges the steps into a steady four-digit number.
// Outputs are combinational from the counter and rank_q.
module rank_display
  import rank_pkg::*;
#(
  parameter int unsigned N_LANES = rank_pkg::NUM_LANES,
  parameter int unsigned CODE_W  = rank_pkg::LANE_CODE_W,
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10_000
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_LANES*CODE_W-1:0] rank_q,
  output seg_t                      seg,
  output logic [N_LANES-1:0]        digit_n,   // bit 0 = rightmost digit, active low
  output logic [2:0]                scan_cnt
);
  // 10 kHz clock of the counter
  logic tick;
  scan_clock_divider #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick)
  );

  logic [3:0] cnt;
  ls197_counter u_cnt (
    .clk    (clk),
    .clr_n  (rst_n),
    .load_n (1'b1),
    .d      (4'd0),
    .cnt_en (tick),
    .q      (cnt)
  );
  assign scan_cnt = cnt[2:0];   // QD is not used

  // digit select
  logic [7:0] y_n;
  ls138_decoder u_dec (
    .g1    (1'b1),
    .g2a_n (1'b0),
    .g2b_n (1'b0),
    .sel   (scan_cnt),
    .y_n   (y_n)
  );
  assign digit_n = y_n[N_LANES:1];

  // never more than one digit lit at a time
  a_one_digit: assert property (@(posedge clk) $onehot0(~digit_n));

  // one selector per code bit: D[g] = that bit of register group g
  logic [CODE_W-1:0] digit_code;
  logic [CODE_W-1:0] w_unused;
  for (genvar b = 0; b < CODE_W; b++) begin : g_sel
    logic [7:0] d;
    always_comb begin
      d = '0;
      for (int g = 1; g <= N_LANES && g < 8; g++) d[g] = rank_q[(g-1)*CODE_W + b];
    end
    ls251_mux u_mux (
      .strobe_n (1'b0),
      .sel      (scan_cnt),
      .d        (d),
      .y        (digit_code[b]),
      .w        (w_unused[b])
    );
  end

  ls48_seg_decoder u_seg (
    .bcd  (4'(digit_code)),
    .lt_n (1'b1),
    .bi_n (1'b1),
    .seg  (seg)
  );
endmodule
