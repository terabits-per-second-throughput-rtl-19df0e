// polar_pkg: constants, types and elaboration-time helpers shared by the
// SC-MJL polar decoder.
//
// The decoder is a fully unrolled successive-cancellation (SC) tree. Every
// node of the tree is specialised at elaboration time from its frozen-bit
// pattern: the functions below classify a node, compute its pipeline latency
// and locate the information bits of the systematic code. Nothing here is
// clocked; all functions are evaluated on parameters only.
//
// Bit-order convention: bit i of a frozen vector is u_i of the polar transform
// x = u * F^{(x)n}, F = [1 0; 1 1], natural (not bit-reversed) order, and a set
// bit means "frozen". A node of size M covering u_lo..u_{lo+M-1} splits into
// a left half (lower indices, decoded first) and a right half.
//
// Code size (N = 1024, K = 854, 5-bit channel LLRs) and the segment decoder
// sizes (N_MJL = 8, N_LIM = 32) follow the reference design. The frozen set
// and the per-level LLR widths are this design's own choice; see below.
package polar_pkg;

  // Widest frozen vector any helper accepts (largest supported N).
  localparam int unsigned FZW = 4096;
  typedef logic [FZW-1:0] fz_t;

  localparam int unsigned N_DEF = 1024;  // code length, one codeword per clock
  localparam int unsigned K_DEF = 854;   // information bits (427 Gb/s at 500 MHz)
  localparam int unsigned Q_DEF = 5;     // channel LLR width in bits
  localparam int unsigned N_MJL = 8;     // block length of the MJL segment decoder
  localparam int unsigned N_LIM = 32;    // largest Wagner / MAP segment

  // MJL(8,2) segment: frozen indicator v = {1,1,1,0,1,1,1,0} (v_1 first),
  // i.e. u_3 and u_7 carry information.
  localparam logic [7:0] MJL_PATTERN = 8'b0111_0111;

  // Frozen set of the (1024, 854) code, bit i = 1 when u_i is frozen.
  // Built with the polarization-weight rule: u_i is ranked by
  //   PW(i) = sum over set bits b of i of 2^(b/4)
  // and the N-K positions of lowest weight are frozen (ties: lower index
  // frozen first). The weights were evaluated with 2^(b/4) scaled by 2^16 and
  // rounded, i.e. 2^(b div 4) * {65536, 77936, 92682, 110218}[b mod 4].
  // One segment was then changed so that the MJL(8,2) decoder is used: the
  // length-8 segment u_144..u_151 had information bits {6,7} (pattern 0x3F)
  // and is given the MJL pattern 0x77 (information bits {3,7}) instead; K is
  // unchanged. The resulting information set is still closed under bitwise
  // superset (if u_i carries information, so does every u_j with j OR i = j),
  // which the usual two-pass systematic encoder requires.
  localparam logic [1023:0] FROZEN_1024_854 = 1024'h0000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000001000000010007177f0000000000000000000000000000000100000000000000030000001701171fff00000000000001170001011f01777fff0001037f177f7fff177fffffffffffff;

  // Signed LLR width at each tree level (level s = LLRs entering a node of
  // size 2^s). The channel enters at level log2(N). Widths shrink towards the
  // leaves because LLRs of polarised segments need less resolution. Segments
  // that are decided by hard decision only (rate-1) keep just the sign bit,
  // so the width runs from 5 bits down to 1 bit.
  typedef int unsigned qw_tab_t [16];
  localparam qw_tab_t QW_DEFAULT = '{
    1, 3, 3, 3, 4, 4, 4, 5, 5, 5, 5, 5, 5, 5, 5, 5
  };

  // Pipeline register placement. Bit s set: the stages of every tree node of
  // size 2^s (a segment decoder, or the f and the g stage of a split node)
  // end in a register. REG_ALL registers every stage (159 cycles for the
  // default code). REG_BAL is register balancing: stages of three
  // neighbouring levels share one pipeline stage, registers sit at levels
  // 1, 4, 7 and 10 only (46 cycles for the default code).
  localparam logic [15:0] REG_ALL = 16'hFFFF;
  localparam logic [15:0] REG_BAL = 16'b0000_0100_1001_0010;

  typedef enum logic [2:0] {
    NK_RATE0 = 3'd0,  // all frozen: codeword is all zero, no logic
    NK_RATE1 = 3'd1,  // no frozen bit: hard decision on every LLR
    NK_REP   = 3'd2,  // repetition: MAP decision on the LLR sum
    NK_SPC   = 3'd3,  // single parity check: Wagner decoding
    NK_MJL   = 3'd4,  // MJL(8,2) segment decoder
    NK_SPLIT = 3'd5   // ordinary SC node: f, left, g, right, combine
  } node_kind_e;

  function automatic int unsigned count_frozen(int unsigned m, fz_t fz);
    int unsigned c = 0;
    for (int unsigned i = 0; i < m; i++) c += int'(fz[i]);
    return c;
  endfunction

  function automatic node_kind_e node_kind(int unsigned m, fz_t fz);
    int unsigned nf = count_frozen(m, fz);
    if (nf == m) return NK_RATE0;
    if (nf == 0) return NK_RATE1;
    if (m <= N_LIM && nf == m - 1 && !fz[m-1]) return NK_REP;
    if (m <= N_LIM && nf == 1 && fz[0]) return NK_SPC;
    if (m == N_MJL && fz[7:0] == MJL_PATTERN) return NK_MJL;
    return NK_SPLIT;
  endfunction

  // Cycles from the LLRs entering a node to its codeword estimate leaving it.
  function automatic int unsigned node_lat(int unsigned m, fz_t fz, logic [15:0] regs);
    int unsigned r;
    case (node_kind(m, fz))
      NK_RATE0: return 0;
      NK_SPLIT: begin
        r = int'(regs[$clog2(m)]);
        return r + node_lat(m / 2, fz, regs) + r + node_lat(m / 2, fz >> (m / 2), regs);
      end
      default:  return int'(regs[$clog2(m)]);
    endcase
  endfunction

  // Codeword position of the k-th information bit (k = 0 is the lowest).
  function automatic int unsigned info_pos(int unsigned n, fz_t fz, int unsigned k);
    int unsigned c = 0;
    for (int unsigned i = 0; i < n; i++) begin
      if (!fz[i]) begin
        if (c == k) return i;
        c++;
      end
    end
    return 0;
  endfunction

endpackage
