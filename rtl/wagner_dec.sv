// wagner_dec: Wagner decoder for a single-parity-check (SPC) segment.
//
// A segment of M bits whose only frozen bit is u_0 is an even-parity code.
// Wagner's rule is its ML decoder: take the hard decision of every LLR; if
// the decisions have odd parity, flip the one whose LLR magnitude is
// smallest (the lowest index wins a tie). Output is the M-bit codeword
// estimate. Purely combinational; the enclosing tree node registers it.
// The reference design uses it for segments of up to N_LIM = 32 bits.
module wagner_dec #(
  parameter int unsigned M = 8,  // segment length, a power of two >= 4
  parameter int unsigned W = 5   // LLR width
) (
  input  logic [M-1:0][W-1:0] llr,
  output logic [M-1:0]        beta,
  output logic                flipped  // parity failed and one bit was flipped
);
  logic [M-1:0]         hard;
  logic [W-1:0]         mag, min_mag;
  logic [$clog2(M)-1:0] min_idx;
  logic                 parity;

  always_comb begin
    hard    = '0;
    min_mag = '1;
    min_idx = '0;
    for (int unsigned i = 0; i < M; i++) begin
      hard[i] = llr[i][W-1];
      mag     = llr[i][W-1] ? W'(-$signed(llr[i])) : llr[i];
      if (mag < min_mag || i == 0) begin
        min_mag = mag;
        min_idx = $clog2(M)'(i);
      end
    end
    parity  = ^hard;
    beta    = hard;
    beta[min_idx] = hard[min_idx] ^ parity;
    flipped = parity;
  end
endmodule
