// tube_model: behavioural model of a four-digit common-cathode
// seven-segment tube, for testbenches only. Whenever a digit's select is
// low, the digit takes the current segment pattern and keeps it until it
// is selected again, as the afterglow of a scanned display would. shown[i]
// is digit i counted from the right; value[i] decodes it to 0..9 (15 if
// the pattern is not a digit). sel_count[i] counts how often digit i was
// selected.
module tube_model (
  input  logic [6:0]      seg,
  input  logic [3:0]      digit_n,
  output logic [3:0][6:0] shown,
  output logic [3:0][3:0] value,
  output int              sel_count [4]
);
  initial foreach (sel_count[i]) sel_count[i] = 0;

  for (genvar i = 0; i < 4; i++) begin : g_digit
    always_latch
      if (!digit_n[i]) shown[i] = seg;
  end

  always @(negedge digit_n[0]) sel_count[0]++;
  always @(negedge digit_n[1]) sel_count[1]++;
  always @(negedge digit_n[2]) sel_count[2]++;
  always @(negedge digit_n[3]) sel_count[3]++;

  function automatic logic [3:0] decode(logic [6:0] s);
    case (s)
      7'b0111111: return 4'd0;
      7'b0000110: return 4'd1;
      7'b1011011: return 4'd2;
      7'b1001111: return 4'd3;
      7'b1100110: return 4'd4;
      7'b1101101: return 4'd5;
      7'b1111100: return 4'd6;
      7'b0000111: return 4'd7;
      7'b1111111: return 4'd8;
      7'b1100111: return 4'd9;
      default:    return 4'd15;
    endcase
  endfunction

  always_comb
    for (int i = 0; i < 4; i++) value[i] = decode(shown[i]);
endmodule
