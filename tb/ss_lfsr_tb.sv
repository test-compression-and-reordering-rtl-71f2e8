// ss_lfsr_tb: checks that the state-skip LFSR visits every third pattern of
// the conventional sequence: 111, 010, 110, then 101, 100, 011, 001, 111.
module ss_lfsr_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic en = 1'b0;
  logic [2:0] state;
  int checks = 0;
  int failures = 0;

  ss_lfsr dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(state));

  always #5 clk = ~clk;

  task automatic check(input logic [2:0] exp, input string what);
    checks++;
    if (state !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, state, exp);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(3'b111, "after reset");
    en = 1'b1;
    for (int k = 1; k <= 14; k++) begin
      @(negedge clk);
      check(CONV_SEQ[(3 * k) % 7], $sformatf("jump %0d", k));
    end
    en = 1'b0;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(3'b111, "load");
    en = 1'b1;
    for (int k = 1; k <= 2; k++) begin
      @(negedge clk);
      check(SKIP_SEQ[k], $sformatf("skip pattern T%0d", 3 * k + 1));
    end
    en = 1'b0;
    @(negedge clk);
    check(SKIP_SEQ[2], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
