// tb_sc_node: tests one SC tree of size 64 whose frozen pattern contains
// every node type (rate-0, rate-1, repetition, SPC, MJL(8,2), splits down to
// single bits).
//
// Two instances run side by side: one with a register after every stage and
// one with the balanced register placement. Random LLR vectors (and
// codewords of the segment code sent without noise) enter one per clock;
// both outputs are compared with the behavioural reference decoder, and the
// latency of each instance with the value expected from its register mask.
module automatic tb_sc_node;
  import polar_pkg::*;
  import polar_ref_pkg::*;

  localparam int M = 64;
  localparam int W = 5;
  localparam logic [M-1:0] FZ = 64'h3F06_1700_01FF_7F77;
  localparam int NV = 400;

  logic                clk = 1'b0;
  logic [M-1:0][W-1:0] alpha = '0;
  logic [M-1:0]        beta_all, beta_bal;

  sc_node #(.M(M), .WIN(W), .FROZEN(FZ), .REGS(REG_ALL)) dut_all (.clk(clk), .alpha(alpha), .beta(beta_all));
  sc_node #(.M(M), .WIN(W), .FROZEN(FZ), .REGS(REG_BAL)) dut_bal (.clk(clk), .alpha(alpha), .beta(beta_bal));

  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  bit fz[];
  qw_t qw;
  logic [M-1:0] expv[NV];
  int lat_all, lat_bal;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fz = new[M];
    foreach (fz[i]) fz[i] = FZ[i];
    foreach (qw[i]) qw[i] = int'(QW_DEFAULT[i]);
    lat_all = lat(fz, 0, M, REG_ALL);
    lat_bal = lat(fz, 0, M, REG_BAL);
    clear_counters();
    for (int t = 0; t < NV; t++) begin
      int a[];
      bit b[], x[];
      logic [M-1:0][W-1:0] av;
      a = new[M];
      if (t % 4 == 0) begin
        // a codeword of the segment code, no noise
        x = new[M];
        foreach (x[i]) x[i] = fz[i] ? 1'b0 : 1'($urandom);
        enc(x);
        foreach (a[i]) a[i] = x[i] ? -($urandom_range(1, 15)) : $urandom_range(1, 15);
      end else begin
        foreach (a[i]) a[i] = $signed($urandom_range(0, 30)) - 15;
      end
      dec(fz, 0, a, qw, 1'b0, b);
      foreach (b[i]) expv[t][i] = b[i];
      if (t % 4 == 0) begin
        bit ok = 1;
        foreach (x[i]) if (x[i] != b[i]) ok = 0;
        check(ok, "reference decoder on a noiseless codeword");
      end
      for (int i = 0; i < M; i++) av[i] = W'(a[i]);
      alpha <= av;
      @(posedge clk);
    end
  end

  // vector k is on alpha between posedge k and posedge k+1 (edges counted
  // from 0 at time 0); after L registers its result is seen at the negedge
  // that follows posedge k + L.
  int edges = 0;
  always @(posedge clk) edges <= edges + 1;

  initial begin
    int na = 0, nb = 0;
    for (int t = 0; t < NV + lat_all + 2; t++) begin
      @(negedge clk);
      if (edges >= lat_all && edges - lat_all < NV) begin
        check(beta_all === expv[edges - lat_all], $sformatf("all-registers output %0d", edges - lat_all));
        na++;
      end
      if (edges >= lat_bal && edges - lat_bal < NV) begin
        check(beta_bal === expv[edges - lat_bal], $sformatf("balanced output %0d", edges - lat_bal));
        nb++;
      end
    end
    check(na == NV && nb == NV, "every vector checked");
    $display("latency: %0d cycles with every stage registered, %0d balanced", lat_all, lat_bal);
    $display("events: spc=%0d flip=%0d rep=%0d mjl=%0d rate1=%0d split=%0d sat=%0d",
             cnt_spc, cnt_spc_flip, cnt_rep, cnt_mjl, cnt_rate1, cnt_split, cnt_sat);
    check(cnt_spc_flip > 0 && cnt_mjl > 0 && cnt_rep > 0 && cnt_rate1 > 0 && cnt_sat > 0,
          "a node type was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
