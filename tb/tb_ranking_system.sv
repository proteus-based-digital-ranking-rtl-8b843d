// tb_ranking_system: end-to-end test of the ranking system at its default
// sizes (50 MHz clock, 10 kHz scan). Switch pulses are applied as objects
// crossing lines; after each event the test waits one full display scan
// and reads the four digits back through a tube model, comparing them and
// the register with a queue model of the crossing order (newest digit on
// the right, empty places 0). It also checks that a release reaches the
// register three clock edges later and that the scan visits each digit
// once per eight 10 kHz steps. Covered and counted: single crossings, a
// full register, a fifth crossing pushing out the oldest, overlapping
// pulses (only the one released last is ranked), the reset switch, and
// the blank scan steps.
module tb_ranking_system;
  import rank_pkg::*;
  localparam int DIV  = 50_000_000 / 10_000;   // clock cycles per scan step
  localparam int SCAN = 8 * DIV;                // one full scan

  logic clk = 0;
  logic [3:0] trig_sw;
  logic reset_sw;
  seg_t seg;
  logic [3:0] digit_n;
  logic [11:0] rank_q;
  logic [3:0][6:0] shown;
  logic [3:0][3:0] value;
  int sel_count [4];

  int checks = 0, failures = 0;
  int n_single = 0, n_full = 0, n_overflow = 0, n_overlap = 0, n_reset = 0, n_blank = 0;
  logic [2:0] model [4];

  ranking_system dut (.clk, .trig_sw, .reset_sw, .seg, .digit_n, .rank_q);
  tube_model u_tube (.seg, .digit_n, .shown, .value, .sel_count);

  always #10 clk = ~clk;     // 50 MHz

  always @(posedge clk) if (digit_n == 4'hF) n_blank++;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] packed_model();
    return {model[3], model[2], model[1], model[0]};
  endfunction

  task automatic push(input logic [2:0] lane);
    if (model[3] != 0) n_overflow++;
    for (int g = 3; g > 0; g--) model[g] = model[g-1];
    model[0] = lane;
    if (model[3] != 0) n_full++;
  endtask

  // wait for a full scan, then compare the tube and the register with the model
  task automatic check_display(input string what);
    int prev_cnt [4];
    foreach (prev_cnt[i]) prev_cnt[i] = sel_count[i];
    repeat (SCAN + 2 * DIV) @(posedge clk);
    #1;
    checks++;
    if (rank_q !== packed_model()) begin
      failures++;
      $display("FAIL %s: rank_q=%o exp %o", what, rank_q, packed_model());
    end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (value[g] !== 4'(model[g])) begin
        failures++;
        $display("FAIL %s: digit %0d from right shows %0d, exp %0d", what, g + 1, value[g], model[g]);
      end
      checks++;   // each digit refreshed once or twice in 1.25 scans
      if (sel_count[g] - prev_cnt[g] < 1 || sel_count[g] - prev_cnt[g] > 2) begin
        failures++;
        $display("FAIL %s: digit %0d refreshed %0d times", what, g + 1, sel_count[g] - prev_cnt[g]);
      end
    end
  endtask

  // one object crossing lane `lane` (1..4): switch high for a few cycles
  task automatic lane_cross(input int lane);
    logic [11:0] old_q;
    @(negedge clk);
    trig_sw[lane-1] = 1'b1;
    repeat (3 + $urandom % 20) @(negedge clk);
    old_q = rank_q;
    trig_sw[lane-1] = 1'b0;
    // the register must change on the third rising edge after the release
    repeat (2) @(posedge clk);
    #1; checks++;
    if (rank_q !== old_q) begin failures++; $display("FAIL register changed early"); end
    @(posedge clk); #1;
    push(3'(lane));
    checks++;
    if (rank_q !== packed_model()) begin failures++; $display("FAIL latency: rank_q=%o exp %o", rank_q, packed_model()); end
    n_single++;
    repeat (5) @(negedge clk);
  endtask

  task automatic press_reset();
    @(negedge clk);
    reset_sw = 1'b1;
    repeat (4) @(negedge clk);
    #1; checks++;
    if (rank_q !== 0) begin failures++; $display("FAIL register not cleared while reset held"); end
    reset_sw = 1'b0;
    foreach (model[g]) model[g] = 0;
    n_reset++;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    trig_sw = 0; reset_sw = 0;
    foreach (model[g]) model[g] = 0;
    // power-up: press reset once, the tube shows four zeros
    press_reset();
    check_display("after reset");

    // lanes cross in the order 2, 4, 1, 3
    lane_cross(2); check_display("first");
    lane_cross(4); check_display("second");
    lane_cross(1); check_display("third");
    lane_cross(3); check_display("fourth");
    checks++;
    if (value !== {4'd2, 4'd4, 4'd1, 4'd3}) begin failures++; $display("FAIL final order"); end

    // a fifth crossing pushes the first out on the left
    lane_cross(1); check_display("fifth");

    // overlapping pulses: lanes 1 and 2 together, lane 1 released first
    @(negedge clk); trig_sw = 4'b0011;
    repeat (10) @(negedge clk); trig_sw = 4'b0010;
    repeat (10) @(negedge clk); trig_sw = 4'b0000;
    push(3'd2); n_overlap++;
    check_display("overlap, lane 2 released last");
    // and lane 2 released first: only lane 1 is ranked
    @(negedge clk); trig_sw = 4'b0011;
    repeat (7) @(negedge clk); trig_sw = 4'b0001;
    repeat (7) @(negedge clk); trig_sw = 4'b0000;
    push(3'd1); n_overlap++;
    check_display("overlap, lane 1 released last");

    // reset in the middle of a round
    press_reset();
    check_display("reset");
    lane_cross(3); check_display("after reset, first");

    // a few random rounds
    for (int r = 0; r < 3; r++) begin
      press_reset();
      for (int n = 0; n < 1 + $urandom % 5; n++) lane_cross(1 + $urandom % 4);
      check_display("random round");
    end

    // every mechanism must have happened
    checks++; if (n_single  == 0) begin failures++; $display("FAIL no single crossing"); end
    checks++; if (n_full    == 0) begin failures++; $display("FAIL register never full"); end
    checks++; if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_overlap == 0) begin failures++; $display("FAIL no overlap"); end
    checks++; if (n_reset   == 0) begin failures++; $display("FAIL no reset"); end
    checks++; if (n_blank   == 0) begin failures++; $display("FAIL no blank scan step"); end
    $display("crossings=%0d full=%0d overflows=%0d overlaps=%0d resets=%0d blank_cycles=%0d",
             n_single, n_full, n_overflow, n_overlap, n_reset, n_blank);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
