// polar_f: the SC "f" (check-node) update in min-sum form.
//
//   f(a, b) = sign(a) * sign(b) * min(|a|, |b|)
//
// One magnitude comparator picks the smaller magnitude and one XOR gate forms
// the output sign, as in the reference architecture. The result is then
// requantised to the WO-bit width of the next tree level by symmetric
// saturation to +-(2^(WO-1)-1). WO = 1 keeps only the sign bit (value -1 for
// a negative LLR, 0 otherwise), which is all a hard decision needs.
// Purely combinational. Inputs and output are two's complement.
module polar_f #(
  parameter int unsigned WI = 5,  // input LLR width
  parameter int unsigned WO = 5   // output LLR width after requantisation
) (
  input  logic signed [WI-1:0] a,
  input  logic signed [WI-1:0] b,
  output logic signed [WO-1:0] y
);
  logic [WI-1:0] mag_a, mag_b, mag_min;
  logic          sgn;

  always_comb begin
    mag_a   = a[WI-1] ? WI'(-a) : WI'(a);   // |a| as unsigned, -2^(WI-1) fits
    mag_b   = b[WI-1] ? WI'(-b) : WI'(b);
    mag_min = (mag_a < mag_b) ? mag_a : mag_b;  // comparator
    sgn     = a[WI-1] ^ b[WI-1];                // XOR gate
  end

  if (WO == 1) begin : g_sign_only
    assign y = (sgn && mag_min != '0) ? 1'sb1 : 1'sb0;
  end else begin : g_sat
    localparam int unsigned MW = (WI > WO) ? WI : WO;
    localparam logic [MW-1:0] LIM = MW'((1 << (WO - 1)) - 1);
    logic [MW-1:0] mag_ext, mag_sat;
    always_comb begin
      mag_ext = MW'(mag_min);
      mag_sat = (mag_ext > LIM) ? LIM : mag_ext;
      y       = sgn ? -$signed(WO'(mag_sat)) : $signed(WO'(mag_sat));
    end
  end
endmodule
