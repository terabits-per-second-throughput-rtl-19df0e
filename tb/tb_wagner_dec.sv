// tb_wagner_dec: random 8-LLR vectors (4-bit) into the Wagner decoder. The
// reference searches all 128 even-weight words for the largest correlation
// metric. The decoder's output must be an even-weight word with that metric
// (ties may be broken either way), and 'flipped' must equal the parity of
// the hard decisions.
module automatic tb_wagner_dec;
  localparam int M = 8, W = 4;
  logic [M-1:0][W-1:0] llr;
  logic [M-1:0]        beta;
  logic                flipped;
  int checks = 0, failures = 0, flips = 0;

  wagner_dec #(.M(M), .W(W)) dut (.llr(llr), .beta(beta), .flipped(flipped));

  function automatic int metric(int v[M], logic [M-1:0] c);
    int s = 0;
    for (int i = 0; i < M; i++) s += c[i] ? -v[i] : v[i];
    return s;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int v[M];
      int best = -1000;
      logic [M-1:0] hard;
      foreach (v[i]) begin
        v[i] = $signed($urandom_range(0, 15)) - 8;
        llr[i] = W'(v[i]);
        hard[i] = v[i] < 0;
      end
      for (int c = 0; c < 256; c++)
        if (^c[7:0] == 1'b0 && metric(v, 8'(c)) > best) best = metric(v, 8'(c));
      #1;
      checks += 3;
      if (^beta !== 1'b0) begin failures++; $display("FAIL t=%0d odd output", t); end
      if (metric(v, beta) != best) begin failures++; $display("FAIL t=%0d metric %0d want %0d", t, metric(v, beta), best); end
      if (flipped !== ^hard) failures++;
      if (flipped) flips++;
    end
    checks++;
    if (flips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
