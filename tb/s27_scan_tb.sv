// s27_scan_tb: functional mode against the s27 reference model (random
// primary inputs, state and output checked every cycle), and scan mode:
// a shifted-in pattern lands in {G7,G6,G5}, the state shifts out G7 first.
module s27_scan_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] pi = '0;
  logic se = 1'b0;
  logic si = 1'b0;
  logic so, po;
  logic [2:0] state;
  int checks = 0;
  int failures = 0;

  s27_scan dut (.clk(clk), .rst_n(rst_n), .pi(pi), .se(se), .si(si),
                .so(so), .po(po), .state(state));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pat_t model, nxt;
    logic exp_po;
    logic [2:0] p;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    model = '0;
    // functional mode
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      pi = 4'($urandom);
      #1;
      s27_step(model, pi, nxt, exp_po);
      check(po, exp_po, $sformatf("po cycle %0d", k));
      checks++;
      if (state !== model) begin
        failures++;
        $display("FAIL state cycle %0d: got %b expected %b", k, state, model);
      end
      model = nxt;
    end
    // exhaustive: load every state by scan, capture with every input
    for (int s = 0; s < 8; s++) begin
      for (int v = 0; v < 16; v++) begin
        p = 3'(s);
        @(negedge clk);
        se = 1'b1;
        for (int b = 2; b >= 0; b--) begin
          si = p[b];
          @(negedge clk);
        end
        checks++;
        if (state !== p) begin
          failures++;
          $display("FAIL scan load %b got %b", p, state);
        end
        se = 1'b0;
        pi = 4'(v);
        #1;
        s27_step(p, pi, nxt, exp_po);
        check(po, exp_po, $sformatf("capture po s=%0d v=%0d", s, v));
        @(negedge clk);
        // shift the captured state out: G7, G6, G5
        se = 1'b1;
        si = 1'b0;
        for (int b = 2; b >= 0; b--) begin
          check(so, nxt[b], $sformatf("scan out bit %0d s=%0d v=%0d", b, s, v));
          @(negedge clk);
        end
        se = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
