// tb_ls48_seg_decoder: checks the seven-segment patterns of 0..15 against
// a table of the segments lit in each glyph, written as segment letters,
// and the lamp-test and blanking inputs.
module tb_ls48_seg_decoder;
  import rank_pkg::*;
  logic [3:0] bcd;
  logic lt_n, bi_n;
  seg_t seg;
  int checks = 0, failures = 0;

  ls48_seg_decoder dut (.bcd, .lt_n, .bi_n, .seg);

  // segments lit per input, as letters a..g
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "cdefg", "abc",
                      "abcdefg", "abcfg", "deg", "cdg", "bfg", "adfg", "defg", ""};

  function automatic seg_t from_letters(string s);
    seg_t r = '0;
    for (int i = 0; i < s.len(); i++) r[3'(s[i] - "a")] = 1'b1;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lt_n = 1; bi_n = 1;
    for (int v = 0; v < 16; v++) begin
      bcd = 4'(v);
      #1;
      checks++;
      if (seg !== from_letters(lit[v])) begin
        failures++;
        $display("FAIL bcd=%0d seg=%b exp %b", v, seg, from_letters(lit[v]));
      end
    end
    lt_n = 0; bcd = 4'd1; #1; checks++; if (seg !== 7'h7F) failures++;
    bi_n = 0; #1; checks++; if (seg !== 7'h00) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
