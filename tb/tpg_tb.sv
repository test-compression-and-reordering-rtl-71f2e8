// tpg_tb: conventional mode gives the 7 LFSR patterns, state-skip mode the
// 3 patterns 111, 010, 110; one pattern per cycle with ready held high,
// patterns held under back-pressure, `last` on the final one.
module tpg_tb;
  import tcr_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic skip_mode = 1'b0;
  logic pat_valid, pat_last, busy;
  logic pat_ready = 1'b0;
  logic [2:0] pat_data;
  int checks = 0;
  int failures = 0;

  tpg dut (.clk(clk), .rst_n(rst_n), .start(start), .skip_mode(skip_mode),
           .pat_valid(pat_valid), .pat_ready(pat_ready), .pat_data(pat_data),
           .pat_last(pat_last), .busy(busy));

  always #5 clk = ~clk;

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

  // Runs one session; returns the patterns and the cycles from the first
  // pattern to the last.
  task automatic session(input bit mode, input bit stall, output logic [2:0] got [$],
                         output int cycles);
    int c = 0;
    bit seen_last = 0;
    got = {};
    @(negedge clk);
    skip_mode = mode;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    skip_mode = !mode;   // must have been latched
    while (!seen_last && c < 100) begin
      pat_ready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      if (pat_valid && pat_ready) begin
        got.push_back(pat_data);
        seen_last = pat_last;
      end
      if (pat_valid && !pat_ready) begin
        logic [2:0] held = pat_data;
        @(negedge clk);
        c++;
        check(pat_valid && pat_data == held, "pattern held under back-pressure");
        continue;
      end
      @(negedge clk);
      c++;
    end
    pat_ready = 1'b0;
    cycles = c;
    #1;
    check(!pat_valid && !busy, "idle after last pattern");
  endtask

  initial begin
    logic [2:0] got [$];
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 6; r++) begin
      bit mode;
      bit stall;
      mode = r[0];
      stall = r[1];
      session(mode, stall, got, cyc);
      if (!mode) begin
        check(got.size() == 7, $sformatf("conventional count %0d", got.size()));
        foreach (got[i]) check(got[i] == CONV_SEQ[i % 7],
          $sformatf("conventional pattern %0d: %b", i, got[i]));
      end else begin
        check(got.size() == 3, $sformatf("state skip count %0d", got.size()));
        foreach (got[i]) check(got[i] == SKIP_SEQ[i % 3],
          $sformatf("state skip pattern %0d: %b", i, got[i]));
      end
      if (!stall) check(cyc == got.size(), $sformatf("one pattern per cycle (%0d cycles)", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
