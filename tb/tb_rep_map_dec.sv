// tb_rep_map_dec: random 8-LLR vectors (4-bit) into the repetition decoder.
// The expected decision is the ML one, found by comparing the correlation of
// the LLRs with the all-zero and the all-one codeword (a tie decides 0).
module automatic tb_rep_map_dec;
  localparam int M = 8, W = 4;
  logic [M-1:0][W-1:0] llr;
  logic [M-1:0]        beta;
  int checks = 0, failures = 0, ones = 0;

  rep_map_dec #(.M(M), .W(W)) dut (.llr(llr), .beta(beta));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int v[M];
      int m0 = 0, m1 = 0;
      logic [M-1:0] e;
      foreach (v[i]) begin
        v[i] = (t < 16) ? ((t[0] ? -8 : 7)) : $signed($urandom_range(0, 15)) - 8;
        llr[i] = W'(v[i]);
        m0 += v[i];   // metric of codeword 0...0
        m1 -= v[i];   // metric of codeword 1...1
      end
      #1;
      e = (m1 > m0) ? '1 : '0;
      if (e[0]) ones++;
      checks++;
      if (beta !== e) begin failures++; $display("FAIL t=%0d got %b want %b", t, beta, e); end
    end
    checks++;
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
