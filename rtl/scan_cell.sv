// scan_cell: mux-D scan flip-flop.
//
// A 2:1 multiplexer in front of a D flip-flop: with scan enable SE = 0 the
// flop takes the functional data DI (input 0 of the mux), with SE = 1 the
// scan input SI (input 1). Q is both the functional output and the scan
// output towards the next cell. The asynchronous active-low reset to 0 is
// this design's own addition, so that the flop starts at a known value.
//
// Timing: Q updates on the rising clock edge.
module scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic q
);

  logic d;

  always_comb d = se ? si : di;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
