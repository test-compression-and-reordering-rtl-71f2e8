// tcr_pkg: constants shared by the low-power scan test flow.
//
// The flow feeds the ISCAS'89 s27 benchmark through its 3-flop scan chain
// with patterns from a 3-bit LFSR (polynomial x^3+x+1, seed 111), optionally
// compressed by a state-skip LFSR, and reorders the patterns so that
// successive patterns differ in as few bits as possible.
//
// Pattern bit order: bit 2 is FF3, bit 1 is FF2, bit 0 is FF1, so the value
// 3'b011 is the pattern printed as "011" (FF3=0, FF2=1, FF1=1).
package tcr_pkg;

  // Width of the test pattern generator and of the s27 scan chain.
  localparam int unsigned PATTERN_WIDTH = 3;

  // Taps of the Fibonacci LFSR: the feedback into FF3 is FF3 xor FF1,
  // which realises x^3 + x + 1.
  localparam logic [PATTERN_WIDTH-1:0] LFSR_TAPS = 3'b101;

  // Initial seed 111.
  localparam logic [PATTERN_WIDTH-1:0] LFSR_SEED = 3'b111;

  // A state-skip step advances the LFSR by this many ordinary steps, so
  // SKIP_STEPS-1 states are jumped over.
  localparam int unsigned SKIP_STEPS = 3;

  // Maximal-length period of the LFSR: 2^N - 1 patterns.
  localparam int unsigned LFSR_PERIOD = (1 << PATTERN_WIDTH) - 1;

  // Patterns in a state-skip session: the jumps that start inside one
  // period, ceil(period / skip).
  localparam int unsigned SKIP_PATTERNS = (LFSR_PERIOD + SKIP_STEPS - 1) / SKIP_STEPS;

  // Capacity of the reordering buffer: one full LFSR period.
  localparam int unsigned MAX_PATTERNS = LFSR_PERIOD;

  // Width of the switching-activity accumulators.
  localparam int unsigned SA_WIDTH = 8;

  // s27 primary inputs G0..G3.
  localparam int unsigned S27_PI = 4;

  typedef logic [PATTERN_WIDTH-1:0] pattern_t;

endpackage
