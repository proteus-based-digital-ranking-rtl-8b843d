// tb_reset_control: a press of the reset switch must pull rst_n low at
// once, hold it while pressed, and release it exactly two clock edges
// after the switch is let go.
module tb_reset_control;
  logic clk = 0, reset_sw, rst_n;
  int checks = 0, failures = 0;

  reset_control dut (.clk, .reset_sw, .rst_n);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset_sw = 1; #2;
    checks++; if (rst_n !== 0) failures++;
    for (int n = 0; n < 20; n++) begin
      int len;
      len = 1 + $urandom % 6;
      @(negedge clk); #1 reset_sw = 0;
      @(posedge clk); #1; checks++; if (rst_n !== 0) begin failures++; $display("FAIL early release"); end
      @(posedge clk); #1; checks++; if (rst_n !== 1) begin failures++; $display("FAIL not released"); end
      repeat (len) @(posedge clk);
      #2 reset_sw = 1;              // between clock edges: asynchronous assertion
      #1; checks++; if (rst_n !== 0) begin failures++; $display("FAIL not asserted at once"); end
      repeat (len) @(posedge clk);
      #1; checks++; if (rst_n !== 0) begin failures++; $display("FAIL released while held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
