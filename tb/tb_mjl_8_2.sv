// tb_mjl_8_2: random 5-bit LLR vectors into the MJL(8,2) decoder. The
// reference runs plain SC over the segment element by element: four f
// values summed decide u3, then the four g values g(l_i, l_{i+4}, u3) summed
// decide u7; the codeword is {u7 x4, (u3^u7) x4}. Noiseless codewords of the
// segment code must come back unchanged.
module automatic tb_mjl_8_2;
  localparam int W = 5;
  logic [7:0][W-1:0] llr;
  logic [7:0]        beta;
  int checks = 0, failures = 0, n_u3 = 0, n_u7 = 0;

  mjl_8_2 #(.W(W)) dut (.llr(llr), .beta(beta));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int v[8];
      int sf = 0, sg = 0;
      bit u3, u7;
      logic [7:0] e, sent;
      bit c3, c7;
      if (t % 8 == 0) begin
        c3 = 1'($urandom);
        c7 = 1'($urandom);
        for (int i = 0; i < 8; i++) begin
          bit x = (i < 4) ? (c3 ^ c7) : c7;
          v[i] = x ? -int'($urandom_range(1, 16)) : int'($urandom_range(1, 15));
          sent[i] = x;
        end
      end else begin
        foreach (v[i]) v[i] = $signed($urandom_range(0, 31)) - 16;
      end
      foreach (v[i]) llr[i] = W'(v[i]);
      for (int i = 0; i < 4; i++) begin
        int ma = v[i] < 0 ? -v[i] : v[i];
        int mb = v[i+4] < 0 ? -v[i+4] : v[i+4];
        int m = ma < mb ? ma : mb;
        sf += ((v[i] < 0) != (v[i+4] < 0)) ? -m : m;
      end
      u3 = sf < 0;
      for (int i = 0; i < 4; i++) sg += u3 ? v[i+4] - v[i] : v[i+4] + v[i];
      u7 = sg < 0;
      e = {{4{u7}}, {4{u3 ^ u7}}};
      n_u3 += u3;
      n_u7 += u7;
      #1;
      checks++;
      if (beta !== e) begin failures++; $display("FAIL t=%0d got %b want %b", t, beta, e); end
      if (t % 8 == 0) begin
        checks++;
        if (beta !== sent) begin failures++; $display("FAIL t=%0d noiseless codeword not recovered", t); end
      end
    end
    checks++;
    if (n_u3 == 0 || n_u7 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
