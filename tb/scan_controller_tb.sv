// scan_controller_tb: the controller drives a behavioural 3-cell scan chain
// whose capture function is known (next = {s0, s2^s1, ~s1}, output = xor of
// the cells). Every pattern's response must come back in order with the
// right captured value and output. Sessions with patterns always available
// check the cycle count (4 per pattern plus 4); sessions with gaps in the
// pattern stream must take the stall path and still give correct responses.
module scan_controller_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic pat_valid = 1'b0;
  logic pat_ready;
  logic [2:0] pat_data = '0;
  logic pat_last = 1'b0;
  logic se, si, so, po;
  logic resp_valid, resp_po, stall, session_done;
  logic [2:0] resp_data;
  logic [2:0] chain;
  int checks = 0;
  int failures = 0;
  int stalls = 0;
  int cycle = 0;

  scan_controller dut (.clk(clk), .rst_n(rst_n),
    .pat_valid(pat_valid), .pat_ready(pat_ready), .pat_data(pat_data), .pat_last(pat_last),
    .se(se), .si(si), .so(so), .po(po),
    .resp_valid(resp_valid), .resp_data(resp_data), .resp_po(resp_po),
    .stall(stall), .session_done(session_done));

  function automatic logic [2:0] capture_fn(input logic [2:0] s);
    return {s[0], s[2] ^ s[1], ~s[1]};
  endfunction

  // behavioural chain: si -> chain[0] -> chain[1] -> chain[2] -> so
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  chain <= '0;
    else if (se) chain <= {chain[1:0], si};
    else         chain <= capture_fn(chain);
  end
  assign so = chain[2];
  assign po = ^chain;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && stall) stalls <= stalls + 1;
  end

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

  logic [2:0] sent [$];
  int got_n;
  int done_cycle;

  // response monitor
  always @(negedge clk) begin
    if (rst_n && resp_valid) begin
      logic [2:0] p;
      if (sent.size() == 0) begin
        check(0, "response without pattern");
      end else begin
        p = sent.pop_front();
        check(resp_data == capture_fn(p),
              $sformatf("response of %b: got %b expected %b", p, resp_data, capture_fn(p)));
        check(resp_po == ^p, $sformatf("po of %b", p));
        got_n++;
      end
    end
    if (rst_n && session_done) done_cycle = cycle;
  end

  task automatic session(input int n, input bit gaps, input string what);
    int first_cycle = -1;
    got_n = 0;
    done_cycle = -1;
    for (int i = 0; i < n; i++) begin
      pat_valid = 1'b1;
      pat_data = 3'($urandom);
      pat_last = (i == n - 1);
      #1;
      while (!pat_ready) begin
        @(negedge clk);
        #1;
      end
      if (first_cycle < 0) first_cycle = cycle;
      sent.push_back(pat_data);
      @(negedge clk);
      pat_valid = 1'b0;
      if (gaps) repeat ($urandom_range(0, 9)) @(negedge clk);
    end
    pat_valid = 1'b0;
    pat_last = 1'b0;
    repeat (60) begin
      if (done_cycle >= 0) break;
      @(negedge clk);
    end
    check(got_n == n, $sformatf("%s: %0d responses of %0d", what, got_n, n));
    check(done_cycle >= 0, $sformatf("%s: session done", what));
    if (!gaps) check(done_cycle - first_cycle == 4 * n + 4,
      $sformatf("%s: %0d cycles for %0d patterns", what, done_cycle - first_cycle, n));
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    session(7, 0, "7 patterns");
    session(3, 0, "3 patterns");
    session(1, 0, "1 pattern");
    for (int t = 0; t < 10; t++) session($urandom_range(1, 12), 1, $sformatf("gaps %0d", t));
    check(stalls > 0, $sformatf("stall path taken %0d times", stalls));
    check(sent.size() == 0, "no pattern left without response");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
