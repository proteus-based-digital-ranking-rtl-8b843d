// tb_rank_register: drives trigger pulses, single and overlapping, with
// the encoder's lane number computed here, and compares the register with
// a queue model: each release of the last active trigger pushes the lane
// number seen just before the release. Checks that shift is a one-cycle
// pulse in the cycle the OR falls and that rank_q changes on the next edge,
// that a fifth entry drops the oldest, and that the clear empties it.
module tb_rank_register;
  logic clk = 0, rst_n;
  logic [3:0] trig;
  logic [2:0] code;
  logic shift;
  logic [11:0] rank_q;
  logic [2:0] model [4];
  int checks = 0, failures = 0, overlaps = 0, overflows = 0;

  rank_register #(.N_LANES(4), .CODE_W(3)) dut (.clk, .rst_n, .trig, .code, .shift, .rank_q);

  always #5 clk = ~clk;

  always_comb begin
    code = 0;
    for (int i = 0; i < 4; i++) if (trig[i]) code = 3'(i + 1);
  end

  function automatic logic [11:0] packed_model();
    return {model[3], model[2], model[1], model[0]};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one trigger event: a set of lanes go high together and are released in
  // random order; returns after the register has shifted
  task automatic pulse(input logic [3:0] lanes);
    logic [2:0] last_code;
    logic [3:0] left;
    left = lanes;
    @(negedge clk);
    trig = lanes;
    repeat (1 + $urandom % 4) @(negedge clk);
    while (left != 0) begin
      int i;
      do i = $urandom % 4; while (!left[i]);
      if ($countones(left) == 1) last_code = code;   // value seen just before the release
      left[i] = 0;
      trig = left;
      #1;
      checks++;
      if (shift !== (left == 0)) begin failures++; $display("FAIL shift=%b with trig=%b", shift, left); end
      checks++;
      if (rank_q !== packed_model()) begin failures++; $display("FAIL early change"); end
      @(negedge clk);
    end
    for (int g = 3; g > 0; g--) model[g] = model[g-1];
    model[0] = last_code;
    checks++;
    if (shift !== 0 || rank_q !== packed_model()) begin
      failures++;
      $display("FAIL after shift rank_q=%h exp %h", rank_q, packed_model());
    end
    repeat (1 + $urandom % 3) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; trig = 0;
    foreach (model[g]) model[g] = 0;
    #1; checks++; if (rank_q !== 0) failures++;
    @(negedge clk); rst_n = 1;
    // four single lanes in the order 3,1,4,2
    pulse(4'b0100); pulse(4'b0001); pulse(4'b1000); pulse(4'b0010);
    checks++; if (rank_q !== {3'd3, 3'd1, 3'd4, 3'd2}) begin failures++; $display("FAIL order %h", rank_q); end
    // fifth entry pushes out the oldest
    pulse(4'b0001); overflows++;
    checks++; if (rank_q !== {3'd1, 3'd4, 3'd2, 3'd1}) begin failures++; $display("FAIL overflow %h", rank_q); end
    // overlapping lanes 1 and 2, lane 1 released first: only 2 stored
    @(negedge clk); trig = 4'b0011; repeat (3) @(negedge clk);
    trig = 4'b0010; repeat (3) @(negedge clk); trig = 0; overlaps++;
    for (int g = 3; g > 0; g--) model[g] = model[g-1];
    model[0] = 3'd2;
    @(negedge clk);
    checks++; if (rank_q !== packed_model()) begin failures++; $display("FAIL overlap %h", rank_q); end
    // random traffic
    for (int n = 0; n < 300; n++) begin
      logic [3:0] l;
      do l = 4'($urandom); while (l == 0);
      if ($countones(l) > 1) overlaps++;
      pulse(l);
    end
    // clear
    @(negedge clk); rst_n = 0; #1;
    foreach (model[g]) model[g] = 0;
    checks++; if (rank_q !== 0) begin failures++; $display("FAIL clear"); end
    @(negedge clk); rst_n = 1;
    pulse(4'b1000);
    checks++; if (rank_q !== 12'o0004) begin failures++; $display("FAIL after clear %h", rank_q); end
    checks++; if (overlaps == 0 || overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
