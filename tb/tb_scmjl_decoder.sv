// tb_scmjl_decoder: end-to-end test of the full-size decoder (N = 1024,
// K = 854, all parameters at their defaults).
//
// Random information words are encoded systematically, sent over a BPSK/AWGN
// channel model and quantised to 5-bit LLRs. Codewords enter back to back,
// one per clock, with a gap of idle cycles in the middle. Every output is
// compared with the behavioural reference decoder (bit-exact x_hat and
// info); noiseless codewords must also return the information sent. The
// latency is checked against the one expected from the register placement,
// and each decoding mechanism (Wagner flip, repetition decision of 1, MJL
// decision, rate-1 hard decision, saturation of an LLR, back-to-back
// output, idle gap) must occur at least once.
module automatic tb_scmjl_decoder;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N   = N_DEF;
  localparam int K   = K_DEF;
  localparam int Q   = Q_DEF;
  localparam int NFR = 40;   // codewords
  localparam int GAP_AT = 20; // idle cycles are inserted before this codeword

  logic                clk = 1'b0;
  logic                rst = 1'b1;
  logic                in_valid = 1'b0;
  logic [N-1:0][Q-1:0] llr_in = '0;
  logic                out_valid;
  logic [N-1:0]        x_hat;
  logic [K-1:0]        info;

  scmjl_decoder dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0, t_in = -1, t_out = -1, n_out = 0, n_b2b = 0, n_idle_gap = 0;
  bit prev_valid = 0;
  bit fz[];
  int apos[];
  qw_t qw;
  logic [N-1:0] exp_x[$];
  logic [K-1:0] exp_info[$], sent_info[$];
  bit           clean[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frozen set: polarization-weight ranking recomputed here, plus the
  // documented MJL segment u_144..u_151
  initial begin
    longint w[];
    int fr[4] = '{65536, 77936, 92682, 110218};
    int mism = 0;
    fz = new[N];
    w = new[N];
    foreach (w[i]) begin
      w[i] = 0;
      for (int b = 0; b < 10; b++) if (i[b]) w[i] += longint'(1 << (b / 4)) * fr[b % 4];
    end
    foreach (fz[i]) begin
      int r = 0;
      bit expect_fz;
      foreach (w[j]) if (w[j] > w[i] || (w[j] == w[i] && j > i)) r++;
      expect_fz = (r >= K);
      if (i >= 144 && i < 152) expect_fz = !((i - 144) == 3 || (i - 144) == 7);
      fz[i] = FROZEN_1024_854[i];
      if (fz[i] != expect_fz) mism++;
    end
    check(mism == 0, "frozen set differs from its construction rule");
    apos = new[K];
    begin
      int c = 0;
      foreach (fz[i]) if (!fz[i]) begin apos[c] = i; c++; end
      check(c == K, "frozen set size");
    end
    foreach (qw[i]) qw[i] = int'(QW_DEFAULT[i]);
  end

  // stimulus
  initial begin
    clear_counters();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int fr = 0; fr < NFR; fr++) begin
      bit x[], v[], xh[];
      int a[];
      logic [K-1:0] d;
      logic [N-1:0] xe;
      logic [K-1:0] ie;
      logic [N-1:0][Q-1:0] lv;
      real sigma = (fr < 4) ? 0.0 : 0.3 + 0.1 * (fr % 8);
      // systematic encoding: v_A = d, u = v G with u_F = 0, x = u G
      v = new[N];
      foreach (v[i]) v[i] = 0;
      for (int k = 0; k < K; k++) begin d[k] = 1'($urandom); v[apos[k]] = d[k]; end
      enc(v);
      foreach (v[i]) if (fz[i]) v[i] = 0;
      enc(v);
      x = v;
      begin
        bit ok = 1;
        for (int k = 0; k < K; k++) if (x[apos[k]] != d[k]) ok = 0;
        check(ok, "systematic encoder");
      end
      a = new[N];
      foreach (a[i]) a[i] = chan_llr(x[i], sigma, Q);
      dec(fz, 0, a, qw, 1'b0, xh);
      foreach (xh[i]) xe[i] = xh[i];
      for (int k = 0; k < K; k++) ie[k] = xh[apos[k]];
      if (sigma == 0.0) begin
        bit ok = 1;
        foreach (x[i]) if (x[i] != xh[i]) ok = 0;
        check(ok, "reference decoder on a noiseless codeword");
      end
      exp_x.push_back(xe);
      exp_info.push_back(ie);
      sent_info.push_back(d);
      clean.push_back(sigma == 0.0);
      if (fr == GAP_AT) begin
        in_valid <= 1'b0;
        repeat (3) @(posedge clk);
      end
      for (int i = 0; i < N; i++) lv[i] = Q'(a[i]);
      llr_in <= lv;
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  // output checker and latency
  int noisy_err = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !rst && t_in < 0) t_in = cyc;
    if (out_valid) begin
      if (t_out < 0) t_out = cyc;
      if (prev_valid) n_b2b++;
      if (exp_x.size() == 0) check(0, "unexpected output");
      else begin
        logic [N-1:0] xe;
        logic [K-1:0] ie, d;
        bit           c;
        xe = exp_x.pop_front();
        ie = exp_info.pop_front();
        d  = sent_info.pop_front();
        c  = clean.pop_front();
        check(x_hat == xe, $sformatf("x_hat of codeword %0d: %0d bits differ", n_out, $countones(x_hat ^ xe)));
        if (x_hat != xe && failures < 3) for (int i = 0; i < N; i++) if (x_hat[i] != xe[i]) $display("  bit %0d got %b", i, x_hat[i]);
        check(info == ie, $sformatf("info of codeword %0d", n_out));
        if (c) check(info == d, $sformatf("noiseless codeword %0d not recovered", n_out));
        else if (info != d) noisy_err++;
      end
      n_out++;
    end else if (n_out > 0 && n_out < NFR) n_idle_gap++;
    prev_valid <= out_valid;
    if (n_out == NFR && !out_valid) begin
      int exp_lat;
      exp_lat = lat(fz, 0, N, REG_BAL);
      $display("latency: measured %0d cycles, expected %0d", t_out - t_in, exp_lat);
      check(t_out - t_in == exp_lat, "latency");
      check(exp_x.size() == 0, "all codewords returned");
      $display("codewords %0d, noisy codewords with information errors %0d", n_out, noisy_err);
      $display("events: spc=%0d wagner_flip=%0d rep=%0d rep_one=%0d mjl=%0d mjl_u3_one=%0d rate1=%0d split=%0d sat=%0d b2b=%0d idle=%0d",
               cnt_spc, cnt_spc_flip, cnt_rep, cnt_rep_one, cnt_mjl, cnt_mjl_u3, cnt_rate1,
               cnt_split, cnt_sat, n_b2b, n_idle_gap);
      check(cnt_spc_flip > 0, "Wagner flip never happened");
      check(cnt_rep_one > 0, "repetition decision 1 never happened");
      check(cnt_mjl > 0 && cnt_mjl_u3 > 0, "MJL decision never exercised");
      check(cnt_rate1 > 0, "rate-1 segment never decoded");
      check(cnt_sat > 0, "LLR saturation never happened");
      check(n_b2b > 0, "no back-to-back outputs");
      check(n_idle_gap > 0, "no idle gap in the output stream");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
