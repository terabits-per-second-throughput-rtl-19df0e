// sc_node: one node of the fully unrolled SC-MJL decoding tree.
//
// The node receives the M LLRs of its segment and returns the M-bit codeword
// estimate (partial sums) of that segment. At elaboration time it looks at
// its frozen pattern and becomes one of:
//   rate-0  all bits frozen: the estimate is all zero, no logic at all;
//   rate-1  no bit frozen: hard decision of every LLR;
//   REP     repetition segment of at most N_LIM bits: MAP decoder;
//   SPC     single-parity-check segment of at most N_LIM bits: Wagner decoder;
//   MJL     the length-8 pattern {1,1,1,0,1,1,1,0}: MJL(8,2) decoder;
//   split   otherwise an SC step: M/2 f functions feed the left child (a
//           sc_node of size M/2), M/2 g functions combine the delayed LLRs
//           with the left estimate and feed the right child, and the result
//           is beta = {beta_R, beta_L ^ beta_R}.
// A split node instantiates sc_node again, so the whole tree is built by
// recursion and every node is hard-wired for its segment.
//
// Timing: fully pipelined, one codeword per clock, no stalls. The estimate
// appears LAT = polar_pkg::node_lat(M, FROZEN, REGS) cycles after the LLRs.
// All stages of a node of size 2^s (segment decoder, or f and g stage of a
// split) end in a register only when REGS[s] is set; clearing bits merges
// stages of neighbouring tree levels into one pipeline stage (register
// balancing), which trades clock period for fewer pipeline cycles and less
// buffer memory. The LLRs wait in
// a delay_line for the left child, and the left estimate waits in a second
// delay_line for the right child.
//
// Quantisation: the node's input LLRs are WIN bits wide. Its children get
// QW[log2 M - 1] bits, except a rate-1 child, which only needs the sign and
// gets one bit. Widths per level and the choice of REGS are this design's
// own; the node types and segment sizes follow the reference design. Rate-0
// and rate-1 segments are recognised at every size.
//
// Lint note: when sc_node itself is linted as the top module, Verilator
// reports beta_l and beta_r of the split branch as undriven (and clk/alpha as
// unused). It does so for any module that instantiates itself: the report
// concerns the generic template, not an elaborated node. Both signals are
// driven by the child instances' beta ports; the report does not appear when
// the tree is instantiated from scmjl_decoder, and the testbenches show the
// children driving them.
module sc_node
  import polar_pkg::*;
#(
  parameter int unsigned M     = 64,
  parameter int unsigned WIN   = 5,
  parameter logic [M-1:0] FROZEN = 64'h3F06_1700_01FF_7F77,  // mixes every node type
  parameter qw_tab_t     QW    = QW_DEFAULT,
  parameter logic [15:0] REGS  = REG_BAL
) (
  input  logic                  clk,
  input  logic [M-1:0][WIN-1:0] alpha,  // segment LLRs, two's complement
  output logic [M-1:0]          beta    // segment codeword estimate
);
  localparam int unsigned S    = $clog2(M);
  localparam node_kind_e  KIND = node_kind(M, fz_t'(FROZEN));
  localparam int unsigned RS   = REGS[S] ? 1 : 0;  // register after this level's stages

  if (KIND == NK_RATE0) begin : g_rate0
    assign beta = '0;

  end else if (KIND == NK_RATE1) begin : g_rate1
    logic [M-1:0] b_c;
    for (genvar i = 0; i < M; i++) begin : g_hd
      assign b_c[i] = alpha[i][WIN-1];
    end
    delay_line #(.W(M), .D(RS)) u_oreg (.clk(clk), .d(b_c), .q(beta));

  end else if (KIND == NK_REP) begin : g_rep
    logic [M-1:0] b_c;
    rep_map_dec #(.M(M), .W(WIN)) u_rep (.llr(alpha), .beta(b_c));
    delay_line #(.W(M), .D(RS)) u_oreg (.clk(clk), .d(b_c), .q(beta));

  end else if (KIND == NK_SPC) begin : g_spc
    logic [M-1:0] b_c;
    logic         flip_unused;
    wagner_dec #(.M(M), .W(WIN)) u_wag (.llr(alpha), .beta(b_c), .flipped(flip_unused));
    delay_line #(.W(M), .D(RS)) u_oreg (.clk(clk), .d(b_c), .q(beta));

  end else if (KIND == NK_MJL) begin : g_mjl
    logic [7:0] b_c;
    mjl_8_2 #(.W(WIN)) u_mjl (.llr(alpha), .beta(b_c));
    delay_line #(.W(M), .D(RS)) u_oreg (.clk(clk), .d(b_c), .q(beta));

  end else begin : g_split
    localparam int unsigned H      = M / 2;
    localparam logic [H-1:0] FZ_L  = FROZEN[H-1:0];
    localparam logic [H-1:0] FZ_R  = FROZEN[M-1:H];
    localparam node_kind_e  KIND_L = node_kind(H, fz_t'(FZ_L));
    localparam node_kind_e  KIND_R = node_kind(H, fz_t'(FZ_R));
    localparam int unsigned WL     = (KIND_L == NK_RATE1) ? 1 : QW[S-1];
    localparam int unsigned WR     = (KIND_R == NK_RATE1) ? 1 : QW[S-1];
    localparam int unsigned R      = RS;
    localparam int unsigned LAT_L  = node_lat(H, fz_t'(FZ_L), REGS);
    localparam int unsigned LAT_R  = node_lat(H, fz_t'(FZ_R), REGS);

    logic [H-1:0][WL-1:0]  f_c, alpha_l;
    logic [H-1:0][WR-1:0]  g_c, alpha_r;
    logic [M-1:0][WIN-1:0] alpha_d;
    logic [H-1:0]          beta_l, beta_l_d, beta_r;

    // f stage
    for (genvar i = 0; i < H; i++) begin : g_f
      polar_f #(.WI(WIN), .WO(WL)) u_f (.a(alpha[i]), .b(alpha[i+H]), .y(f_c[i]));
    end
    delay_line #(.W(H*WL), .D(R)) u_freg (.clk(clk), .d(f_c), .q(alpha_l));

    sc_node #(.M(H), .WIN(WL), .FROZEN(FZ_L), .QW(QW), .REGS(REGS))
      u_left (.clk(clk), .alpha(alpha_l), .beta(beta_l));

    // LLRs wait for the left estimate
    delay_line #(.W(M*WIN), .D(R + LAT_L)) u_abuf (.clk(clk), .d(alpha), .q(alpha_d));

    // g stage
    for (genvar i = 0; i < H; i++) begin : g_g
      polar_g #(.WI(WIN), .WO(WR)) u_g (
        .a(alpha_d[i]), .b(alpha_d[i+H]), .u(beta_l[i]), .y(g_c[i]));
    end
    delay_line #(.W(H*WR), .D(R)) u_greg (.clk(clk), .d(g_c), .q(alpha_r));

    sc_node #(.M(H), .WIN(WR), .FROZEN(FZ_R), .QW(QW), .REGS(REGS))
      u_right (.clk(clk), .alpha(alpha_r), .beta(beta_r));

    // left estimate waits for the right one
    delay_line #(.W(H), .D(R + LAT_R)) u_bbuf (.clk(clk), .d(beta_l), .q(beta_l_d));

    assign beta = {beta_r, beta_l_d ^ beta_r};
  end
endmodule
