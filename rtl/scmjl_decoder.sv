// scmjl_decoder: fully unrolled, pipelined SC-MJL decoder for a systematic
// (N, K) polar code. One codeword of N channel LLRs enters every clock and
// one decoded codeword leaves every clock, LATENCY cycles later.
//
// At 1 codeword/clock the coded throughput is N bits per cycle: with the
// default N = 1024 and a 500 MHz clock that is 512 Gb/s coded and, with
// K = 854, 427 Gb/s of information. The decoder is an SC tree (sc_node)
// unrolled down to the segment decoders - Wagner for single-parity-check
// segments, MAP for repetition segments (both up to N_LIM = 32 bits), MJL(8,2)
// for its length-8 pattern, hard decision for rate-1 segments - with a
// pipeline register after every stage that REGS selects.
//
// The code is systematic: the tree returns the codeword estimate x_hat
// (the re-encoded partial sums of the root), and the information bits are
// read straight from x_hat at the non-frozen positions. info[k] is x_hat at
// the k-th non-frozen position counted from index 0.
//
// Interface:
//   llr_in[i]  Q-bit two's-complement LLR of code bit x_i, positive = 0 more
//              likely; sampled with in_valid on the rising edge of clk.
//   out_valid  marks x_hat and info of the codeword that entered LATENCY
//              cycles before. There is no back-pressure.
//   rst        synchronous, active high; clears only the valid pipeline.
// N, K, Q, N_MJL, N_LIM follow the reference design; the frozen set, the
// per-level LLR widths QW and the register placement REGS are this design's.
module scmjl_decoder
  import polar_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned K      = K_DEF,
  parameter int unsigned Q      = Q_DEF,
  parameter logic [N-1:0] FROZEN = FROZEN_1024_854,
  parameter qw_tab_t     QW     = QW_DEFAULT,
  parameter logic [15:0] REGS   = REG_BAL
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [N-1:0][Q-1:0] llr_in,
  output logic                out_valid,
  output logic [N-1:0]        x_hat,
  output logic [K-1:0]        info
);
  localparam int unsigned LATENCY = node_lat(N, fz_t'(FROZEN), REGS);

  // A frozen set with N - K frozen positions is required.
  initial assert (count_frozen(N, fz_t'(FROZEN)) == N - K)
    else $error("FROZEN must freeze exactly N-K positions");

  sc_node #(.M(N), .WIN(Q), .FROZEN(FROZEN), .QW(QW), .REGS(REGS))
    u_root (.clk(clk), .alpha(llr_in), .beta(x_hat));

  // valid flag travels alongside the codeword
  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= LATENCY'({vpipe, in_valid});
  end
  assign out_valid = vpipe[LATENCY-1];

  // systematic information bits
  for (genvar k = 0; k < K; k++) begin : g_info
    localparam int unsigned POS = info_pos(N, fz_t'(FROZEN), k);
    assign info[k] = x_hat[POS];
  end
endmodule
