// tpg: test pattern generator with a conventional and a state-skip mode.
//
// A session starts with a one-cycle `start` pulse, which loads the seed into
// both the conventional LFSR and the state-skip LFSR and latches `skip_mode`.
// The generator then offers one pattern per cycle on a valid/ready stream:
//   skip_mode = 0: the conventional LFSR, 2^N-1 patterns (7 for N = 3);
//   skip_mode = 1: the state-skip LFSR, ceil((2^N-1)/SKIP) patterns (3).
// `pat_last` marks the final pattern of the session; after it the generator
// is idle until the next `start`. The pattern counts follow the test flow's
// 7 and 3 patterns; the stream handshake and the start/mode controls are
// this design's own.
//
// Timing: the first pattern is valid the cycle after `start`; with
// `pat_ready` held high a new pattern follows every cycle.
module tpg #(
  parameter int unsigned      WIDTH = tcr_pkg::PATTERN_WIDTH,
  parameter logic [WIDTH-1:0] TAPS  = tcr_pkg::LFSR_TAPS,
  parameter logic [WIDTH-1:0] SEED  = tcr_pkg::LFSR_SEED,
  parameter int unsigned      SKIP  = tcr_pkg::SKIP_STEPS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             skip_mode,
  output logic             pat_valid,
  input  logic             pat_ready,
  output logic [WIDTH-1:0] pat_data,
  output logic             pat_last,
  output logic             busy
);

  localparam int unsigned PERIOD   = (1 << WIDTH) - 1;
  localparam int unsigned NUM_SKIP = (PERIOD + SKIP - 1) / SKIP;
  localparam int unsigned CW       = $clog2(PERIOD + 1);

  logic             mode_q;
  logic [CW-1:0]    count_q;
  logic [CW-1:0]    num_patterns;
  logic             fire;
  logic [WIDTH-1:0] conv_state;
  logic [WIDTH-1:0] skip_state;

  lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED)) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .en    (fire && !mode_q),
    .state (conv_state)
  );

  ss_lfsr #(.WIDTH(WIDTH), .TAPS(TAPS), .SEED(SEED), .SKIP(SKIP)) u_ss_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (start),
    .en    (fire && mode_q),
    .state (skip_state)
  );

  always_comb begin
    num_patterns = mode_q ? CW'(NUM_SKIP) : CW'(PERIOD);
    pat_valid    = busy;
    pat_data     = mode_q ? skip_state : conv_state;
    pat_last     = (count_q == num_patterns - CW'(1));
    fire         = pat_valid && pat_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      mode_q  <= 1'b0;
      count_q <= '0;
    end else if (start) begin
      busy    <= 1'b1;
      mode_q  <= skip_mode;
      count_q <= '0;
    end else if (fire) begin
      count_q <= count_q + CW'(1);
      if (pat_last) busy <= 1'b0;
    end
  end

endmodule
