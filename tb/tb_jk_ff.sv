// tb_jk_ff: checks the JK flip-flop against its function table with
// random J, K, edge and direct set/clear stimulus, using a reference
// model kept in the testbench.
module tb_jk_ff;
  logic clk = 0, sd_n, cd_n, cp_fall, j, k, q, q_n;
  logic ref_q;
  int checks = 0, failures = 0;

  jk_ff dut (.clk, .sd_n, .cd_n, .cp_fall, .j, .k, .q, .q_n);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sd_n = 1; cd_n = 0; cp_fall = 0; j = 0; k = 0;
    @(posedge clk); #1; checks++; if (q !== 0 || q_n !== 1) failures++;       // cleared before the random run
    ref_q = 0;
    cd_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      {j, k} = 2'($urandom);
      cp_fall = ($urandom % 3) != 0;
      sd_n = ($urandom % 23) != 0;
      cd_n = ($urandom % 19) != 0;
      #1;
      if (!sd_n) ref_q = 1;
      else if (!cd_n) ref_q = 0;
      checks++;
      if (q !== ref_q) begin failures++; if (failures < 10) $display("FAIL async n=%0d", n); end
      @(posedge clk);
      if (sd_n && cd_n && cp_fall)
        case ({j, k})
          2'b01: ref_q = 0;
          2'b10: ref_q = 1;
          2'b11: ref_q = ~ref_q;
          default: ;
        endcase
      #1;
      checks++;
      if (q !== ref_q || q_n !== ~ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d jk=%b%b en=%b q=%b exp %b", n, j, k, cp_fall, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
