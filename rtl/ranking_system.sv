// ranking_system: digital finish-order display for four lanes.
// Each lane has a self-resetting switch (sensor) that pulses high when an
// object crosses the line. The switches are synchronised and priority
// encoded into a lane number 1..4 (signal_acquisition); when the OR of the
// switches falls, that number is shifted into a four-deep register
// (rank_register), so the register holds the lanes in crossing order. A
// scanned seven-segment driver (rank_display) shows the register on a
// four-digit common-cathode tube: the first lane to cross ends up on the
// left, the latest on the right, and unfilled places show 0. The reset
// switch (reset_control) clears the register and the scan counter.
// Ports: trig_sw[i] is lane i+1; seg is {g..a}, active high; digit_n[0]
// is the rightmost digit, active low; rank_q exposes the register.
// Timing: a switch release reaches rank_q on the third clk edge; the
// display visits each digit once per 8 scan ticks of 1/SCAN_HZ.
// The single system clock and the synchronisers are this design's
// choices; the circuit it follows is clocked by the switches themselves.
module ranking_system
  import rank_pkg::*;
#(
  parameter int unsigned N_LANES = rank_pkg::NUM_LANES,
  parameter int unsigned CODE_W  = rank_pkg::LANE_CODE_W,
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 10_000
) (
  input  logic                      clk,
  input  logic [N_LANES-1:0]        trig_sw,
  input  logic                      reset_sw,
  output seg_t                      seg,
  output logic [N_LANES-1:0]        digit_n,
  output logic [N_LANES*CODE_W-1:0] rank_q
);
  logic rst_n;
  reset_control u_rst (
    .clk      (clk),
    .reset_sw (reset_sw),
    .rst_n    (rst_n)
  );

  logic [N_LANES-1:0] trig;
  code_t              code;
  signal_acquisition #(.N_LANES(N_LANES)) u_acq (
    .clk     (clk),
    .rst_n   (rst_n),
    .trig_sw (trig_sw),
    .trig    (trig),
    .code    (code)
  );

  logic shift;
  rank_register #(.N_LANES(N_LANES), .CODE_W(CODE_W)) u_reg (
    .clk    (clk),
    .rst_n  (rst_n),
    .trig   (trig),
    .code   (CODE_W'(code)),
    .shift  (shift),
    .rank_q (rank_q)
  );

  logic [2:0] scan_cnt;
  rank_display #(.N_LANES(N_LANES), .CODE_W(CODE_W), .CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_disp (
    .clk      (clk),
    .rst_n    (rst_n),
    .rank_q   (rank_q),
    .seg      (seg),
    .digit_n  (digit_n),
    .scan_cnt (scan_cnt)
  );
endmodule
