# Low-power scan test of s27: state-skip LFSR compression and pattern reordering

Scan testing clocks test patterns into a circuit's flip-flops one after another.
Each bit that flips between one pattern and the next toggles logic, and that
switching sets the test's dynamic power (P = SA · ½ · C · V² · f, where SA is
the switching activity). This design lowers SA in two steps:

1. **Fewer patterns.** A 3-bit LFSR gives a 7-pattern test set. A *state-skip*
   LFSR jumps three states at a time, which cuts the set to 3 patterns.
2. **Fewer flips between patterns.** The patterns are buffered and reordered
   greedily. Each next pattern is the not-yet-used one with the smallest
   Hamming distance to the previous one (a "modified Prim's" ordering).

The reordered patterns are shifted into the scan chain of the ISCAS'89 s27
benchmark. Each is captured and its response shifted out. Two counters measure
SA before and after reordering:

| pattern set           | patterns | SA as generated | SA after reordering |
|-----------------------|---------:|----------------:|--------------------:|
| conventional LFSR     | 7        | 11              | 6                   |
| state-skip LFSR (M=3) | 3        | 3               | 2                   |

After reordering, every pair of consecutive patterns differs in exactly one
bit.

## Data flow

```
            start, skip_mode
                  |
   +--------------v---------------+     +-------------+     +-----------------+     +----------+
   | tpg                          |     | reorder_    |     | scan_           | se  |          |
   |  lfsr     (1 step / cycle)   |---->| unit        |---->| controller      |---->| s27_scan |
   |  ss_lfsr  (3 steps / cycle)  |     | 7 x 3 bit   |     | shift/capture/  | si  | 3 scan   |
   +------------------------------+     +-------------+     | unload          |<----| cells    |
                  |                            |            +-----------------+ so  +----------+
        switching_activity_counter   switching_activity_counter      |               ^ pi[3:0]
            (sa_unordered)               (sa_reordered)           responses          | po (G17)
```

Every stage boundary is a valid/ready stream of 3-bit patterns with a `last`
flag.

## Pattern bit order

A pattern is `{FF3, FF2, FF1}`: bit 2 is FF3 and bit 0 is FF1. So `3'b011`
is the pattern written as 011. The same three bits fill the s27 scan chain.
They are shifted in MSB first, so after loading, `{G7, G6, G5}` equals the
pattern.

## The two pattern generators (`lfsr`, `ss_lfsr`, `tpg`)

`lfsr` is a Fibonacci LFSR for x³ + x + 1 with seed 111. FF3 takes FF3 ⊕ FF1,
FF2 takes FF3 and FF1 takes FF2. One period from the seed is:

```
T1 111  T2 011  T3 101  T4 010  T5 001  T6 100  T7 110
```

`ss_lfsr` produces the state SKIP steps ahead in one clock. Its next-state
logic is the SKIP-th power of the LFSR's linear map, written as a loop that
applies the step SKIP times. Synthesis folds that loop into one XOR level.
With SKIP = 3:

```
FF3' = FF2 ^ FF1      FF2' = FF3 ^ FF2 ^ FF1      FF1' = FF3 ^ FF1
```

From 111 the jumps give T1, T4, T7 = 111, 010, 110. The 7-state period is
prime, so further jumps would cover every state once (T3, T6, T2, T5). A
session stops after ceil(7/3) = 3 patterns.

`tpg` holds both generators. A one-cycle `start` loads the seed and latches
`skip_mode`. The selected generator then offers its 7 or 3 patterns, one per
cycle while `pat_ready` is high, and flags the last one.

## Reordering: modified Prim's algorithm (`reorder_unit`)

This is the least obvious part of the design.

Treat the patterns as graph vertices, with Hamming distance as the edge
weight. Prim's algorithm builds a minimum spanning tree. The tree is cheap,
but walking it to apply the patterns revisits vertices. For T1, T4, T7 the
walk T1 → T7 → T1 → T4 applies T1 twice, which adds transitions. The modified
algorithm builds a path instead, visiting each vertex once:

* start at the first generated pattern;
* repeat: append the unvisited pattern closest in Hamming distance to the
  last appended one;
* on a tie, take the pattern generated earliest.

This is a greedy nearest-neighbour path. It is not guaranteed to be optimal,
but it reaches distance 1 at every step for both sets here:

```
conventional:  111 011 010 110 100 101 001      (SA 6)
state skip:    111 110 010                      (SA 2)
```

Other tie rules give different orders. For example,
111 011 001 101 100 110 010 also has SA 6. The earliest-first rule was chosen
because it gives the order above.

Hardware:

* **LOAD.** `in_ready` is high. Patterns go into a DEPTH-entry register array
  (default 7, one full LFSR period). LOAD ends on `in_last` or when the array
  is full.
* **EMIT.** The output shows `buf[cur]`, starting with entry 0. A `visited`
  bit mask records which entries have been used. A single combinational
  search computes the distance from `buf[cur]` to every valid, unvisited
  entry. It keeps the first entry with a strictly smaller distance, which
  gives the earliest-first tie rule. On each output handshake, `cur` moves to
  the winner and its visited bit is set.
* **Timing.** With `out_ready` high, one pattern leaves per cycle. The first
  one appears the cycle after the last input is accepted.
* **Cost.** The search is DEPTH × WIDTH XORs, a popcount per entry and a
  compare chain. That is fine at 7 × 3 bits. It grows linearly with DEPTH per
  output, and quadratically in total work over a session.
* **Assertion.** A concurrent assertion checks that an offered output stays
  stable until it is taken.

## Scan application (`scan_controller`, `scan_cell`, `s27_scan`)

`scan_cell` is a mux-D flip-flop. With SE = 0 it loads the functional input
DI; with SE = 1 it loads the scan input SI.

`s27_scan` is s27 with its three flip-flops replaced by scan cells. s27 has
inputs G0–G3, output G17 and flip-flops G5, G6, G7. Its gate netlist is the
standard benchmark netlist and is listed in the file header. The chain runs
si → G5 → G6 → G7 → so. `se` = 0 is functional mode and `se` = 1 is scan
mode. The primary inputs come straight from the top-level `pi` port; they are
not generated.

`scan_controller` applies one pattern as follows:

```
cycle:   S  S  S  C | S  S  S  C | ... | U  U  U
se:      1  1  1  0 | 1  1  1  0 |     | 1  1  1
si:      p2 p1 p0 - | q2 q1 q0 - |     | 0  0  0
so:      (old)      | r2 r1 r0   |     | last response
```

* **Shift (S).** Three cycles with scan enable high. The pattern goes in MSB
  first.
* **Capture (C).** One cycle with scan enable low. The flip-flops take their
  functional next state, and G17 is sampled.
* **Overlap.** The next pattern's shift carries the captured response out on
  `so`, G7 first.
* **Unload (U).** After the last pattern, three cycles shift out the final
  response.

A one-entry buffer fetches the next pattern during a shift. If no pattern is
waiting when a capture ends, the controller does an unload right away and
pulses `stall`. It does this because otherwise the next clock would overwrite
the captured response in functional mode. Inside the top this never happens,
because the reorder buffer always has the next pattern ready.

Each response is reported for one cycle on `resp_valid`, with:

* `resp_data` = captured `{G7, G6, G5}`;
* `resp_po` = G17 at capture.

## Top level (`test_compression_top`) and timing

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start` | in | one-cycle pulse that starts a session |
| `skip_mode` | in | 0: 7 conventional patterns; 1: 3 state-skip patterns (sampled with `start`) |
| `pi[3:0]` | in | s27 inputs G3..G0; hold them steady during a session |
| `generating` | out | the pattern generator is running |
| `cut_state[2:0]` | out | s27 flip-flops `{G7,G6,G5}` |
| `scan_se`, `scan_si`, `scan_so`, `po` | out | scan chain signals and G17 |
| `applied_valid`, `applied_data` | out | each pattern as it enters the scan controller, in applied order |
| `resp_valid`, `resp_data`, `resp_po` | out | one response per pattern |
| `stall` | out | forced unload (never happens in this top) |
| `session_done` | out | pulses with the last response |
| `sa_unordered`, `sa_reordered` | out | switching activity before and after reordering |
| `n_generated`, `n_applied` | out | pattern counts |

A session with P patterns takes 5P + 5 cycles from `start` to `session_done`:

* P + 1 cycles until the first reordered pattern is offered (start latency
  plus generation; the pattern enters the controller's buffer in that cycle);
* 1 cycle in which the controller takes it from its buffer;
* 4P cycles to shift and capture the patterns;
* 3 unload cycles.

That is 40 cycles in conventional mode and 20 in state-skip mode. When no
session is running, scan enable is low and s27 runs in functional mode from
`pi`.

The SA counters clear on `start`. They count adjacent pairs within a session
only.

The shared constants are in `tcr_pkg`: width 3, taps 101, seed 111,
SKIP = 3, buffer depth 7, 8-bit counters. Every module also takes them as
parameters. A wider LFSR needs only new `WIDTH`/`TAPS`/`SEED` values. A wider
scan chain, however, needs a different circuit under test.

## Verification

Each module has a self-checking testbench in `tb/`. The reference models are
in `tb/tcr_tb_pkg.sv`: the LFSR table, the expected orders, a software
nearest-neighbour ordering and an s27 model.

| testbench | what it checks |
|---|---|
| `lfsr_tb`, `ss_lfsr_tb` | the sequences against the table, hold, reload |
| `tpg_tb` | both modes; one pattern per cycle; back-pressure |
| `switching_activity_counter_tb` | 11/6/3/2, plus random streams with gaps |
| `reorder_unit_tb` | both fixed sets and 60 random sets (repeats allowed) against the software model; output rate; back-pressure |
| `scan_cell_tb`, `s27_scan_tb` | mux behaviour; s27 in functional mode against the model; all 8 states × 16 inputs through scan load, capture and unload |
| `scan_controller_tb` | a behavioural chain with a known capture function; cycle count 4P+4; gapped streams that force the stall path |
| `test_compression_top_tb` | full flow at default parameters, sessions in both modes; see below |

`test_compression_top_tb` checks:

* the applied order;
* SA 11→6 and 3→2;
* every response and G17 against the s27 model;
* session length 5P+5;
* functional mode between sessions.

It also counts that each mechanism occurred at least once: both modes, a
changed order, shift, capture and functional cycles.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module test_compression_top_tb \
    rtl/tcr_pkg.sv tb/tcr_tb_pkg.sv tb/test_compression_top_tb.sv
./obj_dir/Vtest_compression_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M`. All testbenches finish
in well under a second.

## Design choices and limits

These choices go beyond the method as published:

* **Hardware reordering.** The reordering and the SA measurement are hardware
  blocks here. The method itself only requires that the patterns be reordered
  before they are applied.
* **Reorder start and ties.** The path starts at T1, and ties go to the
  earliest pattern.
* **s27 netlist and chain order.** The netlist is the standard benchmark's.
  The chain order G5 → G6 → G7 and MSB-first shifting are this design's own.
* **Control details.** The valid/ready streams, the one-entry controller
  buffer, the unload on a missing pattern, one capture cycle per pattern and
  the asynchronous resets are all this design's choices.
* **Input source.** The four s27 primary inputs are not driven by the test
  pattern generator. Only the 3-bit chain is.

Not included:

* **Output response analyser.** There is no response compaction or
  comparison. The responses are brought out for an external analyser.
* **Fault injection and coverage.** There is no fault injection and no
  fault-coverage measurement, for example for the stuck-at fault on the G17
  output line.
* **Plain Prim's ordering.** The plain spanning-tree ordering is only a point
  of comparison, so it is not built.
* **4-bit LFSR.** A 4-bit generator is possible only by changing the
  parameters. No 4-bit configuration is defined or tested.
