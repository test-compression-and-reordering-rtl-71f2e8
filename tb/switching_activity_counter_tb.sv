// switching_activity_counter_tb: the switching activity of the four
// sequences of the test flow (11, 6, 3, 2) and of random streams with gaps.
module switching_activity_counter_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic valid = 1'b0;
  logic [2:0] data = '0;
  logic [7:0] sa, n;
  int checks = 0;
  int failures = 0;

  switching_activity_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear),
    .valid(valid), .data(data), .sa(sa), .n_patterns(n));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] seq [$], input int exp_sa, input string what);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    foreach (seq[i]) begin
      valid = 1'b1;
      data = seq[i][2:0];
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        valid = 1'b0;
        data = 3'($urandom);
        @(negedge clk);
      end
    end
    valid = 1'b0;
    @(negedge clk);
    checks++;
    if (sa != 8'(exp_sa) || n != 8'(seq.size())) begin
      failures++;
      $display("FAIL %s: sa=%0d n=%0d expected sa=%0d n=%0d", what, sa, n, exp_sa, seq.size());
    end
  endtask

  initial begin
    logic [31:0] q [$];
    int e;
    int len;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    q = {};
    foreach (CONV_SEQ[i]) q.push_back(32'(CONV_SEQ[i]));
    run(q, 11, "conventional unordered");
    q = {};
    foreach (CONV_ORDER[i]) q.push_back(32'(CONV_ORDER[i]));
    run(q, 6, "conventional reordered");
    q = {};
    foreach (SKIP_SEQ[i]) q.push_back(32'(SKIP_SEQ[i]));
    run(q, 3, "state skip unordered");
    q = {};
    foreach (SKIP_ORDER[i]) q.push_back(32'(SKIP_ORDER[i]));
    run(q, 2, "state skip reordered");
    for (int t = 0; t < 40; t++) begin
      q = {};
      e = 0;
      len = $urandom_range(1, 30);
      for (int i = 0; i < len; i++) begin
        q.push_back(32'($urandom_range(0, 7)));
        if (i > 0) e += hd(q[i], q[i-1]);
      end
      run(q, e, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
