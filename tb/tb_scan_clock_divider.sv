// tb_scan_clock_divider: runs the divider at 1 MHz / 10 kHz and checks
// that ticks are single-cycle pulses exactly 100 clock cycles apart.
module tb_scan_clock_divider;
  localparam int CLK_HZ = 1_000_000, SCAN_HZ = 10_000, DIV = CLK_HZ / SCAN_HZ;
  logic clk = 0, rst_n, tick;
  int checks = 0, failures = 0;

  scan_clock_divider #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) dut (.clk, .rst_n, .tick);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, last, nticks;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #1; checks++; if (tick !== 0) failures++;
    rst_n = 1;
    cyc = 0; last = -1; nticks = 0;
    while (nticks < 20) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (cyc - last != DIV) begin failures++; $display("FAIL period %0d", cyc - last); end
        end else begin
          checks++;
          if (cyc != DIV) begin failures++; $display("FAIL first tick at %0d", cyc); end
        end
        last = cyc; nticks++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
