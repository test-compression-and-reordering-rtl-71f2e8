// scan_cell_tb: the cell takes DI with SE = 0 and SI with SE = 1.
module scan_cell_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic se, di, si, q;
  int checks = 0;
  int failures = 0;

  scan_cell dut (.clk(clk), .rst_n(rst_n), .se(se), .di(di), .si(si), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    se = 1'b0; di = 1'b0; si = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      se = k[0] ^ k[3];
      di = $urandom_range(0, 1);
      si = $urandom_range(0, 1);
      exp = se ? si : di;
      @(negedge clk);
      checks++;
      if (q !== exp) begin
        failures++;
        $display("FAIL k=%0d se=%b di=%b si=%b q=%b", k, se, di, si, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
