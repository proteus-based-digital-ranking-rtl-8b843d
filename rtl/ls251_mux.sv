// ls251_mux: the 74LS251 8-input data selector.
// With the strobe G' low, Y = D[sel] and W = ~Y. The real part's outputs go
// to high impedance when the strobe is high; this two-state version drives
// Y low and W high instead. Combinational. The display uses three of them,
// one per bit of the lane number, to pick the register group to show.
module ls251_mux (
  input  logic       strobe_n,
  input  logic [2:0] sel,      // {C, B, A}
  input  logic [7:0] d,
  output logic       y,
  output logic       w
);
  assign y = !strobe_n && d[sel];
  assign w = !y;
endmodule
