// reorder_unit_tb: the reordering of the conventional and the state-skip
// pattern sets, then random sets of 1..7 patterns (repeats allowed) against
// a software nearest-unvisited-neighbour model, with random back-pressure.
// Checks one output per cycle with ready held high.
module reorder_unit_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic [2:0] in_data = '0;
  logic in_last = 1'b0;
  logic out_valid;
  logic out_ready = 1'b0;
  logic [2:0] out_data;
  logic out_last;
  int checks = 0;
  int failures = 0;

  reorder_unit dut (.clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data), .in_last(in_last),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_last(out_last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input logic [31:0] seq [$], input bit bp, input string what);
    logic [31:0] exp [$];
    logic [2:0] got [$];
    int c = 0;
    int first = -1;
    greedy_order(seq, exp);
    foreach (seq[i]) begin
      in_valid = 1'b1;
      in_data = seq[i][2:0];
      in_last = (i == seq.size() - 1);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    in_last = 1'b0;
    while (got.size() < seq.size() && c < 200) begin
      out_ready = bp ? ($urandom_range(0, 1) == 1) : 1'b1;
      #1;
      if (out_valid && first < 0) first = c;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        check(out_last == (got.size() == seq.size()),
              $sformatf("%s: last flag at %0d", what, got.size()));
      end
      @(negedge clk);
      c++;
    end
    out_ready = 1'b0;
    check(got.size() == exp.size(), $sformatf("%s: count %0d", what, got.size()));
    foreach (got[i]) check(got[i] == exp[i][2:0],
      $sformatf("%s: position %0d got %b expected %b", what, i, got[i], exp[i][2:0]));
    if (!bp) check(c - first == seq.size(),
      $sformatf("%s: %0d outputs took %0d cycles", what, seq.size(), c - first));
    #1;
    check(in_ready && !out_valid, $sformatf("%s: back to loading", what));
  endtask

  initial begin
    logic [31:0] q [$];
    logic [31:0] e [$];
    int len;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // the expected orders of the flow, written out
    q = {};
    foreach (CONV_SEQ[i]) q.push_back(32'(CONV_SEQ[i]));
    greedy_order(q, e);
    foreach (CONV_ORDER[i]) check(e[i][2:0] == CONV_ORDER[i], "model vs expected order");
    run(q, 0, "conventional");
    q = {};
    foreach (SKIP_SEQ[i]) q.push_back(32'(SKIP_SEQ[i]));
    greedy_order(q, e);
    foreach (SKIP_ORDER[i]) check(e[i][2:0] == SKIP_ORDER[i], "model vs expected skip order");
    run(q, 0, "state skip");
    for (int t = 0; t < 60; t++) begin
      q = {};
      len = $urandom_range(1, 7);
      for (int i = 0; i < len; i++) q.push_back(32'($urandom_range(0, 7)));
      run(q, t[0], $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
