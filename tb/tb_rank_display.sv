// tb_rank_display: runs the scan driver with a 10-cycle scan tick
// (CLK_HZ=1000, SCAN_HZ=100) and random register contents. Every cycle it
// checks that digit X from the right is lit with the glyph of register
// group X while the scan count is X (1..4), that nothing is lit on the
// other counts, and that the count steps once every 10 cycles and wraps
// after 7. A tube model must end up showing all four groups.
module tb_rank_display;
  import rank_pkg::*;
  localparam int DIV = 10;
  logic clk = 0, rst_n;
  logic [11:0] rank_q;
  seg_t seg;
  logic [3:0] digit_n;
  logic [2:0] scan_cnt;
  logic [3:0][6:0] shown;
  logic [3:0][3:0] value;
  int sel_count [4];
  int checks = 0, failures = 0, blank_steps = 0;

  rank_display #(.N_LANES(4), .CODE_W(3), .CLK_HZ(1000), .SCAN_HZ(100)) dut (
    .clk, .rst_n, .rank_q, .seg, .digit_n, .scan_cnt);
  tube_model u_tube (.seg, .digit_n, .shown, .value, .sel_count);

  always #5 clk = ~clk;

  // glyphs of 0..7 as in the decoder's data sheet, written as lit segments
  function automatic seg_t glyph(int v);
    case (v)
      0: return 7'b0111111; 1: return 7'b0000110; 2: return 7'b1011011; 3: return 7'b1001111;
      4: return 7'b1100110; 5: return 7'b1101101; 6: return 7'b1111100; default: return 7'b0000111;
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_cnt, since, steps;
    rst_n = 0; rank_q = 0;
    repeat (3) @(posedge clk);
    #1; checks++; if (scan_cnt !== 0 || digit_n !== 4'hF) failures++;
    @(negedge clk); rst_n = 1;
    exp_cnt = 0; since = 0; steps = 0;
    for (int round = 0; round < 40; round++) begin
      @(negedge clk);
      rank_q = (round == 0) ? {3'd1, 3'd2, 3'd3, 3'd4} : 12'($urandom);
      repeat (8 * DIV) begin
        @(posedge clk); #1;
        since++;
        if (scan_cnt != 3'(exp_cnt)) begin
          checks++;
          if (scan_cnt != 3'(exp_cnt + 1) || (steps > 0 && since != DIV)) begin
            failures++;
            if (failures < 10) $display("FAIL scan step %0d -> %0d after %0d cycles", exp_cnt, scan_cnt, since);
          end
          exp_cnt = int'(scan_cnt); since = 0; steps++;
        end
        checks++;
        if (scan_cnt >= 1 && scan_cnt <= 4) begin
          if (digit_n !== ~(4'd1 << (scan_cnt - 1)) ||
              seg !== glyph(int'(rank_q[(scan_cnt-1)*3 +: 3]))) begin
            failures++;
            if (failures < 10) $display("FAIL cnt=%0d digit_n=%b seg=%b", scan_cnt, digit_n, seg);
          end
        end else begin
          blank_steps++;
          if (digit_n !== 4'hF || seg !== glyph(0)) begin
            failures++;
            if (failures < 10) $display("FAIL blank step cnt=%0d digit_n=%b", scan_cnt, digit_n);
          end
        end
      end
      // after a full scan the tube shows the register, group 1 rightmost
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (value[g] !== 4'(rank_q[g*3 +: 3])) begin
          failures++;
          $display("FAIL tube digit %0d shows %0d exp %0d", g, value[g], rank_q[g*3 +: 3]);
        end
      end
    end
    checks++; if (blank_steps == 0 || steps < 8 * 40 - 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
