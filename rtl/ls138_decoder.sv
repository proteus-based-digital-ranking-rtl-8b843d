// ls138_decoder: the 74LS138 3-line to 8-line decoder.
// When enabled (G1 high, G2A' and G2B' low) the output Y[sel] goes low and
// all others stay high; when disabled all outputs are high. Combinational.
// In the display the scan counter drives sel and Y1..Y4 select the four
// digits of the tube, the rightmost first.
module ls138_decoder (
  input  logic       g1,
  input  logic       g2a_n,
  input  logic       g2b_n,
  input  logic [2:0] sel,      // {C, B, A}
  output logic [7:0] y_n
);
  always_comb begin
    y_n = 8'hFF;
    if (g1 && !g2a_n && !g2b_n) y_n[sel] = 1'b0;
  end
endmodule
