// tcr_tb_pkg: reference models shared by the testbenches.
//
// - CONV_SEQ: the 3-bit LFSR sequence from seed 111, written out.
// - CONV_ORDER / SKIP_ORDER: expected reordered sequences.
// - hd(): Hamming distance.
// - greedy_order(): nearest-unvisited-neighbour ordering from the first
//   pattern, earliest pattern first on ties.
// - s27_step(): next state and output of s27, state given as {G7,G6,G5}.
package tcr_tb_pkg;

  typedef logic [2:0] pat_t;

  localparam pat_t CONV_SEQ [7] = '{3'b111, 3'b011, 3'b101, 3'b010,
                                  3'b001, 3'b100, 3'b110};
  localparam pat_t CONV_ORDER [7] = '{3'b111, 3'b011, 3'b010, 3'b110,
                                        3'b100, 3'b101, 3'b001};
  localparam pat_t SKIP_SEQ [3]   = '{3'b111, 3'b010, 3'b110};
  localparam pat_t SKIP_ORDER [3] = '{3'b111, 3'b110, 3'b010};

  function automatic int hd(input logic [31:0] a, input logic [31:0] b);
    int n = 0;
    for (int i = 0; i < 32; i++) if (a[i] != b[i]) n++;
    return n;
  endfunction

  function automatic void greedy_order(input logic [31:0] in_q [$],
                                       output logic [31:0] out_q [$]);
    bit used [$];
    int cur;
    out_q.delete();
    foreach (in_q[i]) used.push_back(1'b0);
    if (in_q.size() == 0) return;
    cur = 0;
    used[0] = 1'b1;
    out_q.push_back(in_q[0]);
    for (int k = 1; k < in_q.size(); k++) begin
      int best = -1;
      int bestd = 1000;
      foreach (in_q[i]) begin
        if (!used[i] && hd(in_q[i], in_q[cur]) < bestd) begin
          bestd = hd(in_q[i], in_q[cur]);
          best = i;
        end
      end
      used[best] = 1'b1;
      cur = best;
      out_q.push_back(in_q[best]);
    end
  endfunction

  // s27 in sum-of-products form of its gate equations.
  function automatic void s27_step(input pat_t st, input logic [3:0] pi,
                                   output pat_t nxt, output logic po);
    bit g0, g1, g2, g3, g5, g6, g7, n8, n9, n10, n11, n12, n13;
    {g3, g2, g1, g0} = pi;
    {g7, g6, g5} = st;
    n12 = !g1 && !g7;
    n8  = !g0 && g6;
    n9  = !((g3 || n8) && (n12 || n8));
    n11 = !g5 && !n9;
    n10 = g0 && !n11;
    n13 = !g2 && !n12;
    nxt = {n13, n11, n10};
    po  = !n11;
  endfunction

endpackage
