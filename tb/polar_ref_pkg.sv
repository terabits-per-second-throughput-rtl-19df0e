// polar_ref_pkg: behavioural reference model of the SC-MJL decoder, written
// independently of the RTL for the testbenches.
//
// dec() decodes a segment recursively on plain integers: rate-0, rate-1,
// repetition (sign of the sum), single parity check (Wagner), the MJL(8,2)
// pattern (SC without requantisation) and ordinary SC splits, with the same
// requantisation rules as the hardware (symmetric saturation per tree level,
// sign only for rate-1 children). lat() gives the expected pipeline latency
// for a register mask, enc() is the polar transform x = u F^(x)n. Counters
// record how often each decoding mechanism acted, so a test can show it was
// exercised.
package polar_ref_pkg;

  typedef int qw_t [16];

  int unsigned cnt_spc_flip, cnt_spc, cnt_rep, cnt_rep_one, cnt_rate1,
               cnt_mjl, cnt_mjl_u3, cnt_split, cnt_sat;

  function automatic void clear_counters();
    cnt_spc_flip = 0; cnt_spc = 0; cnt_rep = 0; cnt_rep_one = 0; cnt_rate1 = 0;
    cnt_mjl = 0; cnt_mjl_u3 = 0; cnt_split = 0; cnt_sat = 0;
  endfunction

  function automatic int sat(int x, int w);
    int lim;
    if (w == 1) return (x < 0) ? -1 : 0;
    lim = (1 << (w - 1)) - 1;
    if (x > lim)  begin cnt_sat++; return lim; end
    if (x < -lim) begin cnt_sat++; return -lim; end
    return x;
  endfunction

  function automatic int iabs(int x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic int f_fn(int a, int b);
    int m = (iabs(a) < iabs(b)) ? iabs(a) : iabs(b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int g_fn(int a, int b, bit u);
    return u ? b - a : b + a;
  endfunction

  // 0 rate0, 1 rate1, 2 rep, 3 spc, 4 mjl, 5 split
  function automatic int kind(const ref bit fz[], input int lo, input int m);
    int nf = 0;
    for (int i = 0; i < m; i++) nf += fz[lo+i];
    if (nf == m) return 0;
    if (nf == 0) return 1;
    if (m <= 32 && nf == m - 1 && fz[lo+m-1] == 0) return 2;
    if (m <= 32 && nf == 1 && fz[lo] == 1) return 3;
    if (m == 8 && fz[lo+0] && fz[lo+1] && fz[lo+2] && !fz[lo+3] &&
        fz[lo+4] && fz[lo+5] && fz[lo+6] && !fz[lo+7]) return 4;
    return 5;
  endfunction

  function automatic int ilog2(int m);
    int s = 0;
    while ((1 << s) < m) s++;
    return s;
  endfunction

  // Decode the segment u_lo..u_{lo+m-1}; a[] holds its m LLRs, b[] receives
  // the codeword estimate. exact = 1 switches requantisation off.
  function automatic void dec(const ref bit fz[], input int lo, input int a[],
                              input qw_t qw, input bit exact, ref bit b[]);
    int m = a.size();
    int h = m / 2;
    int k = kind(fz, lo, m);
    b = new[m];
    case (k)
      0: foreach (b[i]) b[i] = 0;
      1: begin cnt_rate1++; foreach (b[i]) b[i] = (a[i] < 0); end
      2: begin
        int s = 0;
        foreach (a[i]) s += a[i];
        cnt_rep++;
        if (s < 0) cnt_rep_one++;
        foreach (b[i]) b[i] = (s < 0);
      end
      3: begin
        bit p = 0;
        int mi = 0;
        foreach (a[i]) begin
          b[i] = (a[i] < 0);
          p ^= b[i];
          if (iabs(a[i]) < iabs(a[mi])) mi = i;
        end
        cnt_spc++;
        if (p) begin b[mi] ^= 1; cnt_spc_flip++; end
      end
      default: begin
        int al[], ar[];
        bit bl[], br[];
        int wl, wr;
        bit ex = exact || (k == 4);
        if (k == 4) cnt_mjl++; else cnt_split++;
        wl = (kind(fz, lo, h) == 1) ? 1 : qw[ilog2(m) - 1];
        wr = (kind(fz, lo + h, h) == 1) ? 1 : qw[ilog2(m) - 1];
        al = new[h];
        ar = new[h];
        for (int i = 0; i < h; i++) al[i] = ex ? f_fn(a[i], a[i+h]) : sat(f_fn(a[i], a[i+h]), wl);
        dec(fz, lo, al, qw, ex, bl);
        if (k == 4 && bl[0]) cnt_mjl_u3++;
        for (int i = 0; i < h; i++) ar[i] = ex ? g_fn(a[i], a[i+h], bl[i]) : sat(g_fn(a[i], a[i+h], bl[i]), wr);
        dec(fz, lo + h, ar, qw, ex, br);
        for (int i = 0; i < h; i++) begin
          b[i]   = bl[i] ^ br[i];
          b[i+h] = br[i];
        end
      end
    endcase
  endfunction

  // Expected latency: one cycle per registered stage along the SC schedule.
  function automatic int lat(const ref bit fz[], input int lo, input int m, input logic [15:0] regs);
    int k = kind(fz, lo, m);
    int r = regs[ilog2(m)];
    if (k == 0) return 0;
    if (k != 5) return r;
    return 2 * r + lat(fz, lo, m / 2, regs) + lat(fz, lo + m / 2, m / 2, regs);
  endfunction

  // x = u * F^(x)n, F = [1 0; 1 1]
  function automatic void enc(ref bit x[]);
    int n = x.size();
    for (int len = 1; len < n; len *= 2)
      for (int j = 0; j < n; j += 2 * len)
        for (int i = 0; i < len; i++) x[j+i] ^= x[j+i+len];
  endfunction

  // Approximately Gaussian sample (sum of 12 uniforms), zero mean, unit variance.
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return s - 6.0;
  endfunction

  // BPSK over AWGN, LLR quantised with step 1/4 to q bits (symmetric range).
  function automatic int chan_llr(bit x, real sigma, int q);
    real y = (x ? -1.0 : 1.0) + sigma * gauss();
    int v = int'(y * 4.0);
    int lim = (1 << (q - 1)) - 1;
    if (v > lim) v = lim;
    if (v < -lim) v = -lim;
    return v;
  endfunction

endpackage
