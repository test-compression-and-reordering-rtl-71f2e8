// lfsr: conventional Fibonacci linear feedback shift register.
//
// The register shifts from the high flop towards flop 0 (FF3 -> FF2 -> FF1
// for the 3-bit default) and the highest flop takes the xor of the tapped
// flops. With the defaults (taps FF3 and FF1, seed 111) it runs through the
// maximal-length sequence 111, 011, 101, 010, 001, 100, 110 and repeats.
// Width, taps and seed follow the 3-bit example of the test flow; the load
// and enable controls and the asynchronous active-low reset (to the seed)
// are this design's own.
//
// Interface: `load` (priority) puts SEED into the register, `en` advances it
// one step; `state` is the current pattern. Timing: one step per enabled
// clock edge, the new pattern is visible right after that edge.
module lfsr #(
  parameter int unsigned               WIDTH = tcr_pkg::PATTERN_WIDTH,
  parameter logic [WIDTH-1:0]          TAPS  = tcr_pkg::LFSR_TAPS,
  parameter logic [WIDTH-1:0]          SEED  = tcr_pkg::LFSR_SEED
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             en,
  output logic [WIDTH-1:0] state
);

  logic [WIDTH-1:0] next_state;

  always_comb begin
    next_state = {^(state & TAPS), state[WIDTH-1:1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (load) state <= SEED;
    else if (en)   state <= next_state;
  end

endmodule
