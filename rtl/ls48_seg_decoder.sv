// ls48_seg_decoder: the 74LS48 BCD to seven-segment decoder.
// Drives the segments a..g of a common-cathode digit, active high
// (seg[0] = a ... seg[6] = g). Digits 0..9 use the part's own glyphs, in
// which 6 has no top bar and 9 no bottom bar; inputs 10..14 give the
// part's special symbols and 15 is blank. BI' low blanks the digit and
// LT' low lights every segment. Ripple blanking is not provided.
// Combinational.
module ls48_seg_decoder
  import rank_pkg::*;
(
  input  logic [3:0] bcd,      // {D, C, B, A}
  input  logic       lt_n,
  input  logic       bi_n,
  output seg_t       seg
);
  seg_t glyph;
  always_comb begin
    unique case (bcd)                //  gfedcba
      4'd0:  glyph = 7'b0111111;
      4'd1:  glyph = 7'b0000110;
      4'd2:  glyph = 7'b1011011;
      4'd3:  glyph = 7'b1001111;
      4'd4:  glyph = 7'b1100110;
      4'd5:  glyph = 7'b1101101;
      4'd6:  glyph = 7'b1111100;
      4'd7:  glyph = 7'b0000111;
      4'd8:  glyph = 7'b1111111;
      4'd9:  glyph = 7'b1100111;
      4'd10: glyph = 7'b1011000;
      4'd11: glyph = 7'b1001100;
      4'd12: glyph = 7'b1100010;
      4'd13: glyph = 7'b1101001;
      4'd14: glyph = 7'b1111000;
      4'd15: glyph = 7'b0000000;
    endcase
    if (!bi_n)      seg = '0;
    else if (!lt_n) seg = '1;
    else            seg = glyph;
  end
endmodule
