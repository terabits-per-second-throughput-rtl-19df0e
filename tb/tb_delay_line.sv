// tb_delay_line: a random word stream passes a 3-deep and a 0-deep buffer;
// each output must equal the input of 3 (or 0) cycles before.
module automatic tb_delay_line;
  logic       clk = 1'b0;
  logic [7:0] d = '0, q3, q0;
  logic [7:0] hist[$];
  int checks = 0, failures = 0;

  delay_line #(.W(8), .D(3)) dut3 (.clk(clk), .d(d), .q(q3));
  delay_line #(.W(8), .D(0)) dut0 (.clk(clk), .d(d), .q(q0));

  always #1 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (t >= 4) begin
        checks++;
        if (q3 !== hist[hist.size() - 3]) begin failures++; $display("FAIL t=%0d", t); end
      end
      d = 8'($urandom);
      hist.push_back(d);
      #0.1;
      checks++;
      if (q0 !== d) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
