// tb_ls148_encoder: exhaustive check of the 74LS148 priority encoder.
// All 512 combinations of EI' and the eight inputs are applied; the
// expected A, GS' and EO' come from a priority search written here.
module tb_ls148_encoder;
  logic       ei_n;
  logic [7:0] in_n;
  logic [2:0] a_n;
  logic       gs_n, eo_n;
  int checks = 0, failures = 0;

  ls148_encoder dut (.ei_n, .in_n, .a_n, .gs_n, .eo_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [2:0] ea; logic egs, eeo; int top;
      {ei_n, in_n} = 9'(v);
      #1;
      top = -1;
      for (int i = 0; i < 8; i++) if (in_n[i] == 1'b0) top = i;
      if (ei_n)          begin ea = 3'b111; egs = 1; eeo = 1; end
      else if (top < 0)  begin ea = 3'b111; egs = 1; eeo = 0; end
      else               begin ea = ~3'(top); egs = 0; eeo = 1; end
      checks++;
      if ({a_n, gs_n, eo_n} !== {ea, egs, eeo}) begin
        failures++;
        if (failures < 10) $display("FAIL ei_n=%b in_n=%b got %b%b%b exp %b%b%b", ei_n, in_n, a_n, gs_n, eo_n, ea, egs, eeo);
      end
    end
    // rows of the part's truth table, spot-checked literally
    ei_n = 0; in_n = 8'b0111_1111; #1; checks++; if (a_n !== 3'b000) failures++;
    ei_n = 0; in_n = 8'b1110_1111; #1; checks++; if (a_n !== 3'b011) failures++;
    ei_n = 0; in_n = 8'b1111_1110; #1; checks++; if (a_n !== 3'b111 || gs_n !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
