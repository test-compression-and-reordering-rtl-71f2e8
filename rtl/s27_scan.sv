// s27_scan: ISCAS'89 s27 benchmark with its three flip-flops on a scan chain.
//
// s27 is a small sequential benchmark: four primary inputs G0..G3, one
// primary output G17 and three D flip-flops G5, G6, G7. Its gate netlist
// (standard s27 definition):
//   G14 = NOT(G0)          G8  = AND(G14, G6)     G12 = NOR(G1, G7)
//   G15 = OR(G12, G8)      G16 = OR(G3, G8)       G9  = NAND(G16, G15)
//   G11 = NOR(G5, G9)      G10 = NOR(G14, G11)    G13 = NOR(G2, G12)
//   G17 = NOT(G11)         G5 <= G10   G6 <= G11   G7 <= G13
// Each flip-flop is replaced by a mux-D scan cell. With `se` = 0
// (functional mode) the cells take G10, G11, G13; with `se` = 1 (scan mode)
// they form the chain si -> G5 -> G6 -> G7 -> so. The chain order is this
// design's choice. After shifting a 3-bit pattern in most significant bit
// first, {G7, G6, G5} equals the pattern; a captured state leaves on `so` in
// the same order, G7 first.
//
// Interface: `pi[k]` is Gk; `po` is G17 (combinational from `pi` and the
// state); `state` shows {G7, G6, G5} for observation.
module s27_scan (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] pi,
  input  logic       se,
  input  logic       si,
  output logic       so,
  output logic       po,
  output logic [2:0] state
);

  logic g0, g1, g2, g3;
  logic g5, g6, g7;
  logic g8, g9, g10, g11, g12, g13, g14, g15, g16;

  always_comb begin
    {g3, g2, g1, g0} = pi;
    g14 = ~g0;
    g8  = g14 & g6;
    g12 = ~(g1 | g7);
    g15 = g12 | g8;
    g16 = g3 | g8;
    g9  = ~(g16 & g15);
    g11 = ~(g5 | g9);
    g10 = ~(g14 | g11);
    g13 = ~(g2 | g12);
    po  = ~g11;
    so  = g7;
    state = {g7, g6, g5};
  end

  scan_cell u_g5 (.clk(clk), .rst_n(rst_n), .se(se), .di(g10), .si(si), .q(g5));
  scan_cell u_g6 (.clk(clk), .rst_n(rst_n), .se(se), .di(g11), .si(g5), .q(g6));
  scan_cell u_g7 (.clk(clk), .rst_n(rst_n), .se(se), .di(g13), .si(g6), .q(g7));

endmodule
