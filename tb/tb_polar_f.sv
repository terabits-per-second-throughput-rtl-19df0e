// tb_polar_f: exhaustive test of the min-sum f function for 5-bit inputs,
// with a narrower saturated output (3 bits) and a sign-only output (1 bit).
module automatic tb_polar_f;
  logic signed [4:0] a, b;
  logic signed [2:0] y3;
  logic signed [0:0] y1;
  int checks = 0, failures = 0;

  polar_f #(.WI(5), .WO(3)) dut3 (.a(a), .b(b), .y(y3));
  polar_f #(.WI(5), .WO(1)) dut1 (.a(a), .b(b), .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = -16; ia < 16; ia++) begin
      for (int ib = -16; ib < 16; ib++) begin
        int ma, mb, m, e3, e1;
        a = 5'(ia);
        b = 5'(ib);
        #1;
        ma = ia < 0 ? -ia : ia;
        mb = ib < 0 ? -ib : ib;
        m  = ma < mb ? ma : mb;
        if (m > 3) m = 3;
        e3 = ((ia < 0) != (ib < 0)) ? -m : m;
        e1 = (((ia < 0) != (ib < 0)) && ma != 0 && mb != 0) ? -1 : 0;
        checks += 2;
        if (int'(y3) != e3) begin failures++; $display("FAIL f(%0d,%0d)=%0d want %0d", ia, ib, y3, e3); end
        if (int'(y1) != e1) begin failures++; $display("FAIL f1(%0d,%0d)=%0d want %0d", ia, ib, y1, e1); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
