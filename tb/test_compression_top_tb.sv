// test_compression_top_tb: end-to-end test of the low-power scan test flow
// at the design's default sizes.
//
// Runs sessions in conventional and in state-skip mode with different
// primary-input values and checks for each:
//   - the applied order (111 011 010 110 100 101 001, or 111 110 010),
//   - the switching activity before and after reordering (11 -> 6, 3 -> 2),
//   - every scan response {G7,G6,G5} and output G17 against the s27 model,
//   - the session length, 5 cycles per pattern plus 5 from start to done.
// Between sessions the circuit runs in functional mode and its state and
// output are checked cycle by cycle. Each mechanism (both generator modes,
// a reordering that changes the order, scan shift, capture, functional
// mode) is counted and must have happened at least once.
module test_compression_top_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic skip_mode = 1'b0;
  logic [3:0] pi = '0;
  logic generating;
  logic [2:0] cut_state;
  logic scan_se, scan_si, scan_so, po;
  logic applied_valid;
  logic [2:0] applied_data;
  logic resp_valid;
  logic [2:0] resp_data;
  logic resp_po, stall, session_done;
  logic [7:0] sa_unordered, sa_reordered, n_generated, n_applied;
  int checks = 0;
  int failures = 0;
  int cycle = 0;

  int n_conv_sessions = 0;
  int n_skip_sessions = 0;
  int n_reordered = 0;
  int n_shift = 0;
  int n_capture = 0;
  int n_functional = 0;

  test_compression_top dut (
    .clk(clk), .rst_n(rst_n), .start(start), .skip_mode(skip_mode), .pi(pi),
    .generating(generating), .cut_state(cut_state),
    .scan_se(scan_se), .scan_si(scan_si), .scan_so(scan_so), .po(po),
    .applied_valid(applied_valid), .applied_data(applied_data),
    .resp_valid(resp_valid), .resp_data(resp_data), .resp_po(resp_po),
    .stall(stall), .session_done(session_done),
    .sa_unordered(sa_unordered), .sa_reordered(sa_reordered),
    .n_generated(n_generated), .n_applied(n_applied));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic session(input bit mode, input logic [3:0] pi_val);
    logic [2:0] applied [$];
    logic [2:0] resp_got [$];
    logic       po_got [$];
    int start_cycle;
    int done_cycle = -1;
    int p;
    pat_t nxt;
    logic exp_po;
    string tag = mode ? "state skip" : "conventional";
    p = mode ? 3 : 7;
    @(negedge clk);
    pi = pi_val;
    skip_mode = mode;
    start = 1'b1;
    start_cycle = cycle;
    @(negedge clk);
    start = 1'b0;
    skip_mode = 1'b0;
    while (done_cycle < 0 && cycle - start_cycle < 200) begin
      if (applied_valid) applied.push_back(applied_data);
      if (resp_valid) begin
        resp_got.push_back(resp_data);
        po_got.push_back(resp_po);
      end
      if (scan_se) n_shift++;
      check(!stall, "no stall: the reorder buffer always has the next pattern");
      if (session_done) done_cycle = cycle;
      @(negedge clk);
    end
    check(done_cycle - start_cycle == 5 * p + 5,
      $sformatf("%s: session took %0d cycles, expected %0d", tag, done_cycle - start_cycle, 5 * p + 5));
    check(applied.size() == p, $sformatf("%s: %0d patterns applied", tag, applied.size()));
    for (int i = 0; i < applied.size() && i < p; i++)
      check(applied[i] == (mode ? SKIP_ORDER[i % 3] : CONV_ORDER[i]),
        $sformatf("%s: applied pattern %0d is %b", tag, i, applied[i]));
    for (int i = 0; i < applied.size() && i < p; i++)
      if (applied[i] != (mode ? SKIP_SEQ[i % 3] : CONV_SEQ[i])) begin
        n_reordered++;
        break;
      end
    check(sa_unordered == (mode ? 8'd3 : 8'd11),
      $sformatf("%s: switching activity before reordering %0d", tag, sa_unordered));
    check(sa_reordered == (mode ? 8'd2 : 8'd6),
      $sformatf("%s: switching activity after reordering %0d", tag, sa_reordered));
    check(n_generated == 8'(p) && n_applied == 8'(p),
      $sformatf("%s: pattern counts %0d %0d", tag, n_generated, n_applied));
    check(resp_got.size() == p, $sformatf("%s: %0d responses", tag, resp_got.size()));
    for (int i = 0; i < resp_got.size() && i < applied.size(); i++) begin
      s27_step(applied[i], pi_val, nxt, exp_po);
      check(resp_got[i] == nxt, $sformatf("%s pi=%b: response to %b got %b expected %b",
        tag, pi_val, applied[i], resp_got[i], nxt));
      check(po_got[i] == exp_po, $sformatf("%s pi=%b: G17 for %b", tag, pi_val, applied[i]));
      n_capture++;
    end
    if (mode) n_skip_sessions++;
    else      n_conv_sessions++;
  endtask

  // Functional mode: the controller is idle and scan enable low.
  task automatic functional(input int n);
    pat_t model, nxt;
    logic exp_po;
    @(negedge clk);
    model = cut_state;
    for (int k = 0; k < n; k++) begin
      pi = 4'($urandom);
      #1;
      s27_step(model, pi, nxt, exp_po);
      check(!scan_se, "scan enable low in functional mode");
      check(po == exp_po, $sformatf("functional G17 cycle %0d", k));
      @(negedge clk);
      check(cut_state == nxt, $sformatf("functional state cycle %0d: %b vs %b", k, cut_state, nxt));
      model = nxt;
      n_functional++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 8; r++) begin
      session(r[0], 4'($urandom));
      functional(10);
    end
    session(1'b0, 4'b0000);
    session(1'b0, 4'b1111);
    check(n_conv_sessions > 0, $sformatf("conventional sessions: %0d", n_conv_sessions));
    check(n_skip_sessions > 0, $sformatf("state-skip sessions: %0d", n_skip_sessions));
    check(n_reordered > 0, $sformatf("sessions whose order changed: %0d", n_reordered));
    check(n_shift > 0, $sformatf("scan shift cycles: %0d", n_shift));
    check(n_capture > 0, $sformatf("captures checked: %0d", n_capture));
    check(n_functional > 0, $sformatf("functional cycles: %0d", n_functional));
    $display("mechanisms: conventional=%0d state_skip=%0d reordered=%0d shift=%0d capture=%0d functional=%0d",
      n_conv_sessions, n_skip_sessions, n_reordered, n_shift, n_capture, n_functional);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
