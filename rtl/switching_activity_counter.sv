// switching_activity_counter: running switching activity of a pattern stream.
//
// The switching activity between two successive test patterns is their
// Hamming distance, the number of bit positions in which they differ; the
// activity of a whole sequence is the sum over all successive pairs (6 pairs
// for 7 patterns). Dynamic test power is proportional to it
// (P = SA * 0.5 * C * V^2 * f). This block watches a stream, remembers the
// previous pattern and adds the popcount of (previous xor current) for each
// new one. The accumulator width and the `clear` control are this design's
// own.
//
// Interface: `clear` (priority) empties the count and forgets the previous
// pattern; `valid` marks a pattern on `data`. `sa` is the total so far and
// `n_patterns` the number of patterns seen; both update on the clock edge
// that samples the pattern.
module switching_activity_counter #(
  parameter int unsigned WIDTH    = tcr_pkg::PATTERN_WIDTH,
  parameter int unsigned SA_WIDTH = tcr_pkg::SA_WIDTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                valid,
  input  logic [WIDTH-1:0]    data,
  output logic [SA_WIDTH-1:0] sa,
  output logic [SA_WIDTH-1:0] n_patterns
);

  logic [WIDTH-1:0]    prev_q;
  logic                have_prev_q;
  logic [SA_WIDTH-1:0] distance;

  always_comb begin
    distance = '0;
    for (int unsigned b = 0; b < WIDTH; b++) begin
      distance = distance + SA_WIDTH'(data[b] ^ prev_q[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_q      <= '0;
      have_prev_q <= 1'b0;
      sa          <= '0;
      n_patterns  <= '0;
    end else if (clear) begin
      have_prev_q <= 1'b0;
      sa          <= '0;
      n_patterns  <= '0;
    end else if (valid) begin
      prev_q      <= data;
      have_prev_q <= 1'b1;
      n_patterns  <= n_patterns + SA_WIDTH'(1);
      if (have_prev_q) sa <= sa + distance;
    end
  end

endmodule
