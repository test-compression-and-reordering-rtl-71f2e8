// reorder_unit: test-pattern reordering by the modified Prim's algorithm.
//
// Plain Prim's algorithm grows a minimum spanning tree over the patterns
// (edge weight = Hamming distance); walking that tree to apply the patterns
// revisits vertices, and the repeated patterns add transitions. The modified
// algorithm visits every pattern exactly once: starting from the first
// generated pattern, it repeatedly appends the not-yet-visited pattern that
// is closest in Hamming distance to the one appended last. On ties the
// pattern that arrived first wins (this reproduces the order 111, 011, 010,
// 110, 100, 101, 001 for the 7 conventional LFSR patterns, and 111, 110, 010
// for the 3 state-skip patterns).
//
// Operation: in the LOAD phase the unit accepts patterns on the input stream
// into a buffer of DEPTH entries until one carries `in_last` or the buffer is
// full. In the EMIT phase it offers the reordered patterns on the output
// stream, the first being the first pattern loaded, and marks the final one
// with `out_last`; then it returns to LOAD. The nearest-neighbour search over
// all unvisited entries is one combinational step, so with `out_ready` high
// one reordered pattern leaves per cycle. Starting vertex, tie rule, the
// streams and the buffer are this design's own choices; the selection rule
// is the algorithm's.
module reorder_unit #(
  parameter int unsigned WIDTH = tcr_pkg::PATTERN_WIDTH,
  parameter int unsigned DEPTH = tcr_pkg::MAX_PATTERNS
) (
  input  logic             clk,
  input  logic             rst_n,
  // input stream, in generation order
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_last,
  // output stream, in reordered order
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_last
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned DW = $clog2(WIDTH + 2);

  typedef enum logic {LOAD, EMIT} phase_e;

  phase_e           phase_q;
  logic [WIDTH-1:0] buf_q [DEPTH];
  logic [CW-1:0]    n_q;        // patterns held
  logic [CW-1:0]    sent_q;     // patterns emitted so far in EMIT
  logic [IW-1:0]    cur_q;      // index of the pattern on the output
  logic [DEPTH-1:0] visited_q;
  logic [IW-1:0]    next_idx;
  logic             in_fire;
  logic             out_fire;

  // Nearest unvisited neighbour of the current pattern, lowest index on ties.
  always_comb begin
    logic [DW-1:0] best_dist;
    logic [DW-1:0] hd;
    best_dist = DW'(WIDTH + 1);
    next_idx  = '0;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      hd = '0;
      for (int unsigned b = 0; b < WIDTH; b++) begin
        hd = hd + DW'(buf_q[i][b] ^ buf_q[cur_q][b]);
      end
      if ((CW'(i) < n_q) && !visited_q[i] && (hd < best_dist)) begin
        best_dist = hd;
        next_idx  = IW'(i);
      end
    end
  end

  always_comb begin
    in_ready  = (phase_q == LOAD);
    in_fire   = in_valid && in_ready;
    out_valid = (phase_q == EMIT);
    out_data  = buf_q[cur_q];
    out_last  = (sent_q + CW'(1) == n_q);
    out_fire  = out_valid && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q   <= LOAD;
      n_q       <= '0;
      sent_q    <= '0;
      cur_q     <= '0;
      visited_q <= '0;
    end else begin
      case (phase_q)
        LOAD: if (in_fire) begin
          n_q <= n_q + CW'(1);
          if (in_last || (n_q + CW'(1) == CW'(DEPTH))) begin
            phase_q   <= EMIT;
            cur_q     <= '0;
            sent_q    <= '0;
            visited_q <= DEPTH'(1);
          end
        end
        EMIT: if (out_fire) begin
          if (out_last) begin
            phase_q <= LOAD;
            n_q     <= '0;
          end else begin
            sent_q              <= sent_q + CW'(1);
            cur_q               <= next_idx;
            visited_q[next_idx] <= 1'b1;
          end
        end
        default: phase_q <= LOAD;
      endcase
    end
  end

  // Pattern storage; written only while loading.
  always_ff @(posedge clk) begin
    if (in_fire) buf_q[n_q[IW-1:0]] <= in_data;
  end

  // Stream rule: once offered, an output pattern stays until taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data) && $stable(out_last));

endmodule
