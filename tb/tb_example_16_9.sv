// tb_example_16_9: the small (16, 9) example code of the architecture, frozen
// indicator v = {1,1,1,0,1,1,1,0, 1,0,0,0,0,0,0,0}. The tree is one SC split
// whose left segment goes to the MJL(8,2) decoder and whose right segment
// goes to the Wagner decoder. All 512 information words are sent without
// noise (each must come back exactly), then random noisy codewords are
// compared with the behavioural reference decoder. Latency is checked.
module automatic tb_example_16_9;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int N = 16, K = 9, Q = 5;
  localparam logic [N-1:0] FZ = 16'h0177;
  localparam int NCLEAN = 512, NNOISY = 2000;

  logic                clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  logic [N-1:0][Q-1:0] llr_in = '0;
  logic                out_valid;
  logic [N-1:0]        x_hat;
  logic [K-1:0]        info;

  scmjl_decoder #(.N(N), .K(K), .Q(Q), .FROZEN(FZ)) dut (.*);

  always #1 clk = ~clk;

  int checks = 0, failures = 0, t_in = -1, t_out = -1, cyc = 0, n_out = 0;
  bit fz[];
  int apos[K];
  qw_t qw;
  logic [K-1:0] exp_info[$], sent[$];
  bit           clean[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c = 0;
    fz = new[N];
    foreach (fz[i]) begin
      fz[i] = FZ[i];
      if (!fz[i]) begin apos[c] = i; c++; end
    end
    foreach (qw[i]) qw[i] = int'(QW_DEFAULT[i]);
    clear_counters();
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < NCLEAN + NNOISY; t++) begin
      bit v[], xh[];
      int a[];
      logic [K-1:0] d, ie;
      logic [N-1:0][Q-1:0] lv;
      d = (t < NCLEAN) ? K'(t) : K'($urandom);
      v = new[N];
      foreach (v[i]) v[i] = 0;
      for (int k = 0; k < K; k++) v[apos[k]] = d[k];
      enc(v);
      foreach (v[i]) if (fz[i]) v[i] = 0;
      enc(v);
      a = new[N];
      foreach (a[i]) a[i] = chan_llr(v[i], (t < NCLEAN) ? 0.0 : 0.7, Q);
      dec(fz, 0, a, qw, 1'b0, xh);
      for (int k = 0; k < K; k++) ie[k] = xh[apos[k]];
      exp_info.push_back(ie);
      sent.push_back(d);
      clean.push_back(t < NCLEAN);
      foreach (a[i]) lv[i] = Q'(a[i]);
      llr_in <= lv;
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !rst && t_in < 0) t_in = cyc;
    if (out_valid) begin
      logic [K-1:0] ie, d;
      bit c;
      if (t_out < 0) t_out = cyc;
      ie = exp_info.pop_front();
      d  = sent.pop_front();
      c  = clean.pop_front();
      check(info == ie, $sformatf("codeword %0d differs from the reference", n_out));
      if (c) check(info == d, $sformatf("noiseless codeword %0d not recovered", n_out));
      n_out++;
      if (n_out == NCLEAN + NNOISY) begin
        int el;
        el = lat(fz, 0, N, REG_BAL);
        $display("latency %0d cycles (expected %0d); MJL %0d, Wagner %0d of which flipped %0d",
                 t_out - t_in, el, cnt_mjl, cnt_spc, cnt_spc_flip);
        check(t_out - t_in == el, "latency");
        check(cnt_mjl > 0 && cnt_spc_flip > 0, "MJL and Wagner flip exercised");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
