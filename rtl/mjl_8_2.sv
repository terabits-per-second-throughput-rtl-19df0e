// mjl_8_2: MJL(8,2) segment decoder, a length-8 segment with frozen pattern
// v = {1,1,1,0,1,1,1,0}, i.e. information bits u3 and u7.
//
// It performs SC decoding of the segment in one step instead of a chain of
// pipeline stages:
//   * four f functions pair LLR i with LLR i+4; three adders sum them and a
//     decision (d) on the sum gives u3 (the left half is a repetition code);
//   * three adders form A = sum of LLR 0..3 and three form B = sum of LLR
//     4..7; since g is linear, the sum of the four g outputs equals
//     g(A, B, u3) = B + (1 - 2 u3) A, so a single g function and a second
//     decision give u7;
//   * one XOR gate forms the partial sum u3 ^ u7 of the left half.
// That is nine adders, four f, two d, one g and one XOR, matching the
// reference design. All arithmetic is at full precision (no requantisation).
// Output: codeword estimate beta[0..3] = u3 ^ u7, beta[4..7] = u7.
// Purely combinational; the enclosing tree node registers the result.
module mjl_8_2 #(
  parameter int unsigned W = 5
) (
  input  logic [7:0][W-1:0] llr,
  output logic [7:0]        beta
);
  localparam int unsigned FW = W + 1;  // f output, exact for any input
  localparam int unsigned SW = W + 3;  // sums of four values, and g output

  logic signed [FW-1:0] fo [4];
  logic signed [SW-1:0] f_sum, a_sum, b_sum;
  logic signed [SW:0]   g_out;  // one bit wider: exact B +- A
  logic                 u3, u7;

  for (genvar i = 0; i < 4; i++) begin : g_f
    polar_f #(.WI(W), .WO(FW)) u_f (.a(llr[i]), .b(llr[i+4]), .y(fo[i]));
  end

  always_comb begin
    f_sum = SW'(fo[0]) + SW'(fo[1]) + SW'(fo[2]) + SW'(fo[3]);
    a_sum = SW'($signed(llr[0])) + SW'($signed(llr[1])) + SW'($signed(llr[2])) + SW'($signed(llr[3]));
    b_sum = SW'($signed(llr[4])) + SW'($signed(llr[5])) + SW'($signed(llr[6])) + SW'($signed(llr[7]));
  end

  assign u3 = f_sum[SW-1];  // d function

  polar_g #(.WI(SW), .WO(SW+1)) u_g (.a(a_sum), .b(b_sum), .u(u3), .y(g_out));
  assign u7 = g_out[SW];  // d function

  assign beta = {{4{u7}}, {4{u3 ^ u7}}};
endmodule
