// tb_ls138_decoder: exhaustive check of the 74LS138 decoder over every
// enable and select combination against a one-cold reference.
module tb_ls138_decoder;
  logic g1, g2a_n, g2b_n;
  logic [2:0] sel;
  logic [7:0] y_n;
  int checks = 0, failures = 0;

  ls138_decoder dut (.g1, .g2a_n, .g2b_n, .sel, .y_n);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic [7:0] exp_y;
      {g1, g2a_n, g2b_n, sel} = 6'(v);
      #1;
      exp_y = (g1 && !g2a_n && !g2b_n) ? ~(8'd1 << sel) : 8'hFF;
      checks++;
      if (y_n !== exp_y) begin
        failures++;
        $display("FAIL en=%b%b%b sel=%0d y_n=%b exp %b", g1, g2a_n, g2b_n, sel, y_n, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
