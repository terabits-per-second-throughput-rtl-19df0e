// rep_map_dec: MAP decoder for a repetition segment.
//
// A segment of M bits whose frozen pattern is {1,...,1,0} carries one
// information bit, and its codeword is that bit repeated M times. The MAP
// (and ML) decision is the sign of the sum of the M LLRs; a zero sum decides
// 0. The sum is formed at full precision (W + log2 M bits), so no
// requantisation happens inside the segment. Output is the whole M-bit
// codeword estimate (the partial sums the parent needs).
// Purely combinational; the enclosing tree node registers the result.
// The reference design uses this decoder for segments of up to N_LIM = 32 bits.
module rep_map_dec #(
  parameter int unsigned M = 8,  // segment length, a power of two >= 2
  parameter int unsigned W = 5   // LLR width
) (
  input  logic [M-1:0][W-1:0] llr,
  output logic [M-1:0]        beta
);
  localparam int unsigned SW = W + $clog2(M);
  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int unsigned i = 0; i < M; i++) sum += SW'($signed(llr[i]));
    beta = {M{sum[SW-1]}};
  end
endmodule
