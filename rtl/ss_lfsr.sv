// ss_lfsr: state-skip LFSR.
//
// Instead of stepping through every state of the conventional LFSR, this
// register jumps straight to the state SKIP steps ahead, so SKIP-1 states of
// the conventional sequence are left out. The jump is the SKIP-th power of
// the LFSR's linear transition, computed as an xor network: the comb block
// applies the shift-and-feedback step SKIP times to the current state, and
// the synthesiser folds that into one level of xor gates per flop. For the
// default 3-bit LFSR (taps FF3, FF1) and SKIP = 3 this gives
//   FF3' = FF2 ^ FF1,  FF2' = FF3 ^ FF2 ^ FF1,  FF1' = FF3 ^ FF1,
// and from seed 111 the patterns 111, 010, 110 (the 1st, 4th and 7th
// patterns of the conventional LFSR). SKIP = 3 and the seed follow the test
// flow; the load/enable controls and the reset to the seed are this design's
// own.
//
// Interface and timing as for `lfsr`: `load` puts SEED in, `en` makes one
// jump per clock edge.
module ss_lfsr #(
  parameter int unsigned      WIDTH = tcr_pkg::PATTERN_WIDTH,
  parameter logic [WIDTH-1:0] TAPS  = tcr_pkg::LFSR_TAPS,
  parameter logic [WIDTH-1:0] SEED  = tcr_pkg::LFSR_SEED,
  parameter int unsigned      SKIP  = tcr_pkg::SKIP_STEPS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic [WIDTH-1:0] jump_state;

  always_comb begin
    jump_state = state;
    for (int unsigned k = 0; k < SKIP; k++) begin
      jump_state = {^(jump_state & TAPS), jump_state[WIDTH-1:1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= jump_state;
  end

endmodule
