// rank_register: stores the order in which the lanes were triggered.
// The OR of the trigger levels is the clock of the register, and the
// register shifts on its falling edge, i.e. when the last active switch is
// released. It is a serial-in parallel-out shift register of N_LANES groups
// of CODE_W JK flip-flops, each wired as a D flip-flop (J = D, K = D').
// Group 1 takes the new lane number; group g+1 takes what group g held.
// After four triggers group 4 holds the first lane, group 1 the last.
// The number stored is the encoder output of the cycle just before the
// falling edge (the value still present while the switch was high), so
// overlapping pulses store only the switch released last.
// Here the falling edge is found on the system clock: shift pulses for one
// cycle, one cycle after trig goes to all-zero, and rank_q changes on the
// following clock edge. rst_n clears every flip-flop (direct clear).
module rank_register
  import rank_pkg::*;
#(
  parameter int unsigned N_LANES = rank_pkg::NUM_LANES,
  parameter int unsigned CODE_W  = rank_pkg::LANE_CODE_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_LANES-1:0]        trig,
  input  logic [CODE_W-1:0]         code,
  output logic                      shift,
  output logic [N_LANES*CODE_W-1:0] rank_q    // group g at [g*CODE_W +: CODE_W], g = 0 newest
);
  // N_LANES-input OR gate = register clock
  logic cp, cp_d;
  logic [CODE_W-1:0] code_d;
  assign cp = |trig;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cp_d   <= 1'b0;
      code_d <= '0;
    end else begin
      cp_d   <= cp;
      code_d <= code;
    end
  end
  assign shift = cp_d && !cp;   // falling edge of the OR

  // a falling edge is a single-cycle event
  a_shift_pulse: assert property (@(posedge clk) disable iff (!rst_n) shift |=> !shift);

  // serial input of each group: the new code for group 1, the previous group otherwise
  logic [N_LANES*CODE_W-1:0] din;
  assign din = {rank_q[(N_LANES-1)*CODE_W-1:0], code_d};

  logic [N_LANES*CODE_W-1:0] q_n_unused;
  for (genvar b = 0; b < N_LANES*CODE_W; b++) begin : g_ff
    jk_ff u_ff (
      .clk     (clk),
      .sd_n    (1'b1),
      .cd_n    (rst_n),
      .cp_fall (shift),
      .j       (din[b]),
      .k       (~din[b]),
      .q       (rank_q[b]),
      .q_n     (q_n_unused[b])
    );
  end
endmodule
