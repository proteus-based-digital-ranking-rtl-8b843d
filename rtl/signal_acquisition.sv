// signal_acquisition: from trigger switches to a lane number.
// Each of the N_LANES switches gives a high pulse when an object crosses
// its line. The switch levels pass through a two-flop synchronizer (this
// design's addition, as the switches are asynchronous to clk), are
// inverted to active low, and drive inputs 1..N_LANES of a 74LS148
// priority encoder whose enable is tied active. The encoder's inverted
// code is inverted back, so code = n while switch n is the highest-numbered
// active switch and 0 while none is. Unused encoder inputs are held
// inactive. trig carries the synchronised levels to the rank register.
// Latency: code and trig follow a switch two clk cycles later.
module signal_acquisition
  import rank_pkg::*;
#(
  parameter int unsigned N_LANES = rank_pkg::NUM_LANES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_LANES-1:0] trig_sw,
  output logic [N_LANES-1:0] trig,
  output code_t              code
);
  logic [N_LANES-1:0] meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      trig <= '0;
    end else begin
      meta <= trig_sw;
      trig <= meta;
    end
  end

  // inverters in front of the encoder: switch i+1 -> encoder input i+1
  logic [7:0] enc_in_n;
  always_comb begin
    enc_in_n = 8'hFF;
    for (int i = 0; i < N_LANES && i < 7; i++) enc_in_n[i+1] = ~trig[i];
  end

  logic [2:0] a_n;
  logic       gs_n, eo_n;
  ls148_encoder u_enc (
    .ei_n (1'b0),
    .in_n (enc_in_n),
    .a_n  (a_n),
    .gs_n (gs_n),
    .eo_n (eo_n)
  );

  // inverters behind the encoder (GS' and EO' are not used)
  assign code = code_t'(~a_n);
endmodule
