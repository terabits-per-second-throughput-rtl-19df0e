// delay_line: fixed-length pipeline buffer.
//
// Holds a W-bit word for D clock cycles. In a fully unrolled SC decoder every
// codeword in flight needs its LLRs kept until the g stage that uses them, and
// its left partial sums kept until the right sub-tree has finished; these
// buffers are that memory. One word enters and one leaves every cycle, so a
// buffer of depth D holds D codewords at once. D = 0 is a plain wire.
// The stored words are not reset: validity travels on a separate flag.
// The need for this memory follows the reference design; building it from
// flip-flops as a shift register is this design's choice.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] stage [D];
    always_ff @(posedge clk) begin
      stage[0] <= d;
      for (int unsigned i = 1; i < D; i++) stage[i] <= stage[i-1];
    end
    assign q = stage[D-1];
  end
endmodule
