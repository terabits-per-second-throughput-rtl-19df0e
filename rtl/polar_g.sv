// polar_g: the SC "g" (variable-node) update.
//
//   g(a, b, u) = b + (1 - 2u) * a
//
// where u is the partial-sum bit already decided by the left sub-tree. Two
// adders form b + a and b - a side by side and a multiplexer selects one with
// u, as in the reference architecture. The (WI+1)-bit sum is requantised to
// WO bits by symmetric saturation to +-(2^(WO-1)-1); WO = 1 keeps only the
// sign bit (-1 for a negative result, 0 otherwise).
// Purely combinational. Inputs and output are two's complement.
module polar_g #(
  parameter int unsigned WI = 5,
  parameter int unsigned WO = 5
) (
  input  logic signed [WI-1:0] a,
  input  logic signed [WI-1:0] b,
  input  logic                 u,
  output logic signed [WO-1:0] y
);
  localparam int unsigned SW = WI + 1;
  logic signed [SW-1:0] sum_p, sum_m, s;

  always_comb begin
    sum_p = SW'(b) + SW'(a);  // adder 1
    sum_m = SW'(b) - SW'(a);  // adder 2
    s     = u ? sum_m : sum_p;  // multiplexer
  end

  if (WO == 1) begin : g_sign_only
    assign y = s[SW-1] ? 1'sb1 : 1'sb0;
  end else begin : g_sat
    localparam int unsigned MW = (SW > WO) ? SW : WO;
    localparam logic signed [MW-1:0] LIM = MW'((1 << (WO - 1)) - 1);
    logic signed [MW-1:0] s_ext;
    always_comb begin
      s_ext = MW'(s);
      if (s_ext > LIM)       y = WO'(LIM);
      else if (s_ext < -LIM) y = WO'(-LIM);
      else                   y = WO'(s_ext);
    end
  end
endmodule
