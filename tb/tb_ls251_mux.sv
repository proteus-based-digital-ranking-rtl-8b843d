// tb_ls251_mux: checks the 74LS251 selector with random data words,
// every select value and both strobe levels.
module tb_ls251_mux;
  logic strobe_n;
  logic [2:0] sel;
  logic [7:0] d;
  logic y, w;
  int checks = 0, failures = 0;

  ls251_mux dut (.strobe_n, .sel, .d, .y, .w);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 64; n++) begin
      d = 8'($urandom);
      for (int s = 0; s < 16; s++) begin
        logic ey;
        {strobe_n, sel} = 4'(s);
        #1;
        ey = strobe_n ? 1'b0 : ((d >> sel) & 8'd1) != 0;
        checks++;
        if (y !== ey || w !== !ey) begin
          failures++;
          if (failures < 10) $display("FAIL d=%h sel=%0d st=%b y=%b w=%b", d, sel, strobe_n, y, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
