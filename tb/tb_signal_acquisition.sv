// tb_signal_acquisition: applies random switch patterns, each held for a
// few cycles, and checks two cycles later that trig follows the switches
// and code is the number of the highest-numbered active switch (0 if none).
module tb_signal_acquisition;
  logic clk = 0, rst_n;
  logic [3:0] trig_sw, trig;
  logic [2:0] code;
  logic [3:0] prev;
  int checks = 0, failures = 0;

  signal_acquisition #(.N_LANES(4)) dut (.clk, .rst_n, .trig_sw, .trig, .code);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; trig_sw = 4'b1111;
    repeat (2) @(posedge clk);
    #1; checks++; if (trig !== 0 || code !== 0) failures++;
    @(negedge clk); rst_n = 1;
    prev = trig_sw;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 400; n++) begin
      logic [2:0] exp_code;
      @(negedge clk);
      prev = trig_sw;
      trig_sw = (n < 16) ? 4'(n) : 4'($urandom);
      exp_code = 0;
      for (int i = 0; i < 4; i++) if (trig_sw[i]) exp_code = 3'(i + 1);
      @(posedge clk); #1;
      checks++; if (trig !== prev) begin failures++; $display("FAIL latency: trig=%b after one edge", trig); end
      @(posedge clk); #1;
      checks++;
      if (trig !== trig_sw || code !== exp_code) begin
        failures++;
        if (failures < 10) $display("FAIL sw=%b trig=%b code=%0d exp %0d", trig_sw, trig, code, exp_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
