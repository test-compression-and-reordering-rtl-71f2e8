// scan_controller: applies test patterns to a scan chain and unloads the
// responses.
//
// For each pattern the controller shifts it into the chain with scan enable
// high (WIDTH cycles, most significant bit first), then drops scan enable for
// one capture cycle, in which the circuit's flip-flops take their functional
// next state and the primary output is sampled. The captured state is
// shifted out on the scan output while the next pattern is shifted in; after
// the last pattern, or when the next pattern is not yet available at the end
// of a capture, a separate unload shift (scan input 0) brings the response
// out. So a pattern costs WIDTH+1 cycles and a session of P patterns
// WIDTH*(P+1)+P cycles once the first pattern is in hand.
//
// Interface: the pattern stream (valid/ready/data/last) feeds a one-entry
// buffer, so the next pattern is fetched while the current one shifts.
// `se`/`si` drive the chain, `so`/`po` come back from it. Each response is
// reported for one cycle on `resp_valid` with the captured chain state
// `resp_data` (first bit out is the MSB) and the output sampled at capture
// `resp_po`. `stall` pulses when an unload has to be inserted because no
// pattern was waiting; `session_done` pulses with the last response.
// Shift-in/capture/shift-out follows the usual scan test; the buffering,
// the stall unload and the reporting are this design's own.
module scan_controller #(
  parameter int unsigned WIDTH = tcr_pkg::PATTERN_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // pattern stream
  input  logic             pat_valid,
  output logic             pat_ready,
  input  logic [WIDTH-1:0] pat_data,
  input  logic             pat_last,
  // scan chain of the circuit under test
  output logic             se,
  output logic             si,
  input  logic             so,
  input  logic             po,
  // responses
  output logic             resp_valid,
  output logic [WIDTH-1:0] resp_data,
  output logic             resp_po,
  output logic             stall,
  output logic             session_done
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  typedef enum logic [1:0] {IDLE, SHIFT, CAPTURE, UNLOAD} state_e;

  state_e           st_q;
  logic [WIDTH-1:0] buf_data_q;
  logic             buf_last_q;
  logic             buf_valid_q;
  logic [WIDTH-1:0] shreg_q;
  logic             cur_last_q;
  logic [CW-1:0]    cnt_q;
  logic [WIDTH-2:0] resp_sh_q;
  logic             have_resp_q;
  logic             po_q;
  logic             take_buf;
  logic             shift_end;

  always_comb begin
    pat_ready    = !buf_valid_q;
    take_buf     = buf_valid_q &&
                   ((st_q == IDLE) || ((st_q == CAPTURE) && !cur_last_q));
    se           = (st_q == SHIFT) || (st_q == UNLOAD);
    si           = (st_q == SHIFT) ? shreg_q[WIDTH-1] : 1'b0;
    shift_end    = se && (cnt_q == CW'(WIDTH - 1));
    resp_valid   = shift_end && have_resp_q;
    resp_data    = {resp_sh_q, so};
    resp_po      = po_q;
    stall        = (st_q == CAPTURE) && !cur_last_q && !buf_valid_q;
    session_done = (st_q == UNLOAD) && shift_end && cur_last_q;
  end

  // One-entry pattern buffer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_valid_q <= 1'b0;
      buf_data_q  <= '0;
      buf_last_q  <= 1'b0;
    end else if (take_buf) begin
      buf_valid_q <= 1'b0;
    end else if (pat_valid && pat_ready) begin
      buf_valid_q <= 1'b1;
      buf_data_q  <= pat_data;
      buf_last_q  <= pat_last;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= IDLE;
      shreg_q     <= '0;
      cur_last_q  <= 1'b0;
      cnt_q       <= '0;
      resp_sh_q   <= '0;
      have_resp_q <= 1'b0;
      po_q        <= 1'b0;
    end else begin
      if (se) begin
        resp_sh_q <= resp_data[WIDTH-2:0];
        cnt_q     <= shift_end ? '0 : cnt_q + CW'(1);
      end
      case (st_q)
        IDLE: if (take_buf) begin
          shreg_q    <= buf_data_q;
          cur_last_q <= buf_last_q;
          st_q       <= SHIFT;
        end
        SHIFT: begin
          shreg_q <= {shreg_q[WIDTH-2:0], 1'b0};
          if (shift_end) st_q <= CAPTURE;
        end
        CAPTURE: begin
          po_q        <= po;
          have_resp_q <= 1'b1;
          if (take_buf) begin
            shreg_q    <= buf_data_q;
            cur_last_q <= buf_last_q;
            st_q       <= SHIFT;
          end else begin
            st_q <= UNLOAD;
          end
        end
        UNLOAD: if (shift_end) begin
          have_resp_q <= 1'b0;
          st_q        <= IDLE;
        end
        default: st_q <= IDLE;
      endcase
    end
  end

  // The chain must be at least two cells long for the response register.
  initial assert (WIDTH >= 2) else $error("scan_controller: WIDTH must be >= 2");

endmodule
