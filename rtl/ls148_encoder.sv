// ls148_encoder: the 74LS148 8-line to 3-line priority encoder.
// All inputs and outputs are active low. With EI' low, the highest-numbered
// low input is encoded on A2..A0 in inverted form (input 7 gives LLL,
// input 0 gives HHH); GS' goes low when any input is active and EO' goes
// low when the chip is enabled but no input is active. With EI' high all
// outputs are high. Purely combinational. The A outputs follow the part's
// truth table; GS' and EO' are the standard part's cascade outputs.
module ls148_encoder (
  input  logic       ei_n,
  input  logic [7:0] in_n,
  output logic [2:0] a_n,
  output logic       gs_n,
  output logic       eo_n
);
  always_comb begin
    a_n  = 3'b111;
    gs_n = 1'b1;
    eo_n = 1'b1;
    if (!ei_n) begin
      eo_n = 1'b0;
      for (int i = 0; i < 8; i++) begin
        if (!in_n[i]) begin        // later (higher) inputs override earlier ones
          a_n  = ~3'(i);
          gs_n = 1'b0;
          eo_n = 1'b1;
        end
      end
    end
  end
endmodule
