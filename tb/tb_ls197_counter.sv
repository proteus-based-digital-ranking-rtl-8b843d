// tb_ls197_counter: checks counting on enable pulses, wrap-around at 15,
// parallel load and the asynchronous clear against a reference count.
module tb_ls197_counter;
  logic clk = 0, clr_n, load_n, cnt_en;
  logic [3:0] d, q;
  logic [3:0] ref_q;
  int checks = 0, failures = 0;

  ls197_counter dut (.clk, .clr_n, .load_n, .d, .cnt_en, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_n = 0; load_n = 1; cnt_en = 0; d = 0;
    @(posedge clk); #1; checks++; if (q !== 0) failures++;
    ref_q = 0;
    @(negedge clk); clr_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      cnt_en = 1'($urandom % 2);
      load_n = ($urandom % 17) != 0;
      d = 4'($urandom);
      clr_n = ($urandom % 41) != 0;
      #1;
      if (!clr_n) begin
        ref_q = 0;
        checks++; if (q !== 0) failures++;
      end
      @(posedge clk);
      if (clr_n) begin
        if (!load_n) ref_q = d;
        else if (cnt_en) ref_q = ref_q + 1;
      end
      #1;
      checks++;
      if (q !== ref_q) begin failures++; if (failures < 10) $display("FAIL n=%0d q=%0d exp %0d", n, q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
