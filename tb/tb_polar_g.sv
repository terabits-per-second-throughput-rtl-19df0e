// tb_polar_g: exhaustive test of the g function for 5-bit inputs and both
// values of the partial sum, with a 4-bit saturated output and a sign-only
// output.
module automatic tb_polar_g;
  logic signed [4:0] a, b;
  logic              u;
  logic signed [3:0] y4;
  logic signed [0:0] y1;
  int checks = 0, failures = 0;

  polar_g #(.WI(5), .WO(4)) dut4 (.a(a), .b(b), .u(u), .y(y4));
  polar_g #(.WI(5), .WO(1)) dut1 (.a(a), .b(b), .u(u), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int iu = 0; iu < 2; iu++)
      for (int ia = -16; ia < 16; ia++)
        for (int ib = -16; ib < 16; ib++) begin
          int s, e4, e1;
          a = 5'(ia);
          b = 5'(ib);
          u = iu[0];
          #1;
          s  = iu ? ib - ia : ib + ia;
          e4 = s > 7 ? 7 : (s < -7 ? -7 : s);
          e1 = s < 0 ? -1 : 0;
          checks += 2;
          if (int'(y4) != e4) begin failures++; $display("FAIL g(%0d,%0d,%0d)=%0d want %0d", ia, ib, iu, y4, e4); end
          if (int'(y1) != e1) begin failures++; $display("FAIL g1(%0d,%0d,%0d)=%0d", ia, ib, iu, y1); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
