// lfsr_tb: checks the 3-bit LFSR against its pattern table (seed 111,
// feedback FF3 xor FF1), one step per enabled cycle, hold when disabled,
// reload of the seed, and the period of 7.
module lfsr_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic en = 1'b0;
  logic [2:0] state;
  int checks = 0;
  int failures = 0;

  lfsr dut (.clk(clk), .rst_n(rst_n), .load(load), .en(en), .state(state));

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
    // three full periods, one step per cycle
    for (int k = 1; k <= 21; k++) begin
      @(negedge clk);
      check(CONV_SEQ[k % 7], $sformatf("step %0d", k));
    end
    // hold
    en = 1'b0;
    repeat (3) begin
      @(negedge clk);
      check(CONV_SEQ[0], "hold");
    end
    // run two steps, then reload
    en = 1'b1;
    repeat (2) @(negedge clk);
    check(CONV_SEQ[2], "before load");
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(3'b111, "load");
    @(negedge clk);
    check(CONV_SEQ[1], "after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
