// test_compression_top: low-power scan test of the s27 benchmark.
//
// The test patterns come from a 3-bit LFSR (x^3+x+1, seed 111). In
// conventional mode all 7 patterns of its period are used; in state-skip
// mode (`skip_mode` = 1) a state-skip LFSR jumps 3 states at a time and the
// test is compressed to 3 patterns. The patterns are buffered and reordered
// by the modified Prim's algorithm (nearest unvisited pattern in Hamming
// distance), which lowers the number of bit flips between successive
// patterns, and then shifted one by one through the scan chain of s27, with
// a capture cycle after each. Two switching-activity counters measure the
// bit flips of the sequence before and after reordering: 11 -> 6 for the
// conventional patterns and 3 -> 2 for the state-skip patterns.
//
//   tpg -> reorder_unit -> scan_controller -> s27_scan
//    |          |
//    sa counter sa counter
//
// Interface: a one-cycle `start` pulse begins a session in the mode given
// by `skip_mode`; `pi` drives the s27 primary inputs G0..G3 throughout
// (they are not part of the generated patterns). Each response appears for
// one cycle on `resp_valid` with the captured flip-flop values {G7,G6,G5}
// (`resp_data`) and the output G17 at capture (`resp_po`); `session_done`
// pulses with the last one. `applied_valid`/`applied_data` show each pattern
// as it enters the scan controller, in applied order. `sa_unordered` and
// `sa_reordered` hold the totals of the last session once it is done.
// `generating` is high while the pattern generator runs and `cut_state`
// shows the s27 flip-flops {G7,G6,G5}.
// Latency: patterns are generated at one per cycle and the reorder buffer
// fills before the first one is applied; each pattern then takes 4 cycles
// (3 shift + 1 capture) plus 3 unload cycles at the end.
module test_compression_top (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic                            skip_mode,
  input  logic [tcr_pkg::S27_PI-1:0]      pi,
  output logic                            generating,
  output logic [2:0]                      cut_state,
  output logic                            scan_se,
  output logic                            scan_si,
  output logic                            scan_so,
  output logic                            po,
  output logic                            applied_valid,
  output logic [tcr_pkg::PATTERN_WIDTH-1:0] applied_data,
  output logic                            resp_valid,
  output logic [tcr_pkg::PATTERN_WIDTH-1:0] resp_data,
  output logic                            resp_po,
  output logic                            stall,
  output logic                            session_done,
  output logic [tcr_pkg::SA_WIDTH-1:0]    sa_unordered,
  output logic [tcr_pkg::SA_WIDTH-1:0]    sa_reordered,
  output logic [tcr_pkg::SA_WIDTH-1:0]    n_generated,
  output logic [tcr_pkg::SA_WIDTH-1:0]    n_applied
);

  import tcr_pkg::*;

  pattern_t gen_data;
  logic     gen_valid, gen_ready, gen_last;
  pattern_t ord_data;
  logic     ord_valid, ord_ready, ord_last;

  tpg u_tpg (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .skip_mode (skip_mode),
    .pat_valid (gen_valid),
    .pat_ready (gen_ready),
    .pat_data  (gen_data),
    .pat_last  (gen_last),
    .busy      (generating)
  );

  switching_activity_counter u_sa_unordered (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (start),
    .valid      (gen_valid && gen_ready),
    .data       (gen_data),
    .sa         (sa_unordered),
    .n_patterns (n_generated)
  );

  reorder_unit u_reorder (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (gen_valid),
    .in_ready  (gen_ready),
    .in_data   (gen_data),
    .in_last   (gen_last),
    .out_valid (ord_valid),
    .out_ready (ord_ready),
    .out_data  (ord_data),
    .out_last  (ord_last)
  );

  always_comb begin
    applied_valid = ord_valid && ord_ready;
    applied_data  = ord_data;
  end

  switching_activity_counter u_sa_reordered (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (start),
    .valid      (applied_valid),
    .data       (ord_data),
    .sa         (sa_reordered),
    .n_patterns (n_applied)
  );

  scan_controller u_scan_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .pat_valid    (ord_valid),
    .pat_ready    (ord_ready),
    .pat_data     (ord_data),
    .pat_last     (ord_last),
    .se           (scan_se),
    .si           (scan_si),
    .so           (scan_so),
    .po           (po),
    .resp_valid   (resp_valid),
    .resp_data    (resp_data),
    .resp_po      (resp_po),
    .stall        (stall),
    .session_done (session_done)
  );

  s27_scan u_s27 (
    .clk   (clk),
    .rst_n (rst_n),
    .pi    (pi),
    .se    (scan_se),
    .si    (scan_si),
    .so    (scan_so),
    .po    (po),
    .state (cut_state)
  );

endmodule
