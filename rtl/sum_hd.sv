// sum_hd: SUM and hard decision of the parallel decoder's output.
//
// The final decision on an information pair adds the bit LLRs of the two
// component decoders for that pair (DEC2's already de-interleaved) and slices
// the sum: a positive sum decides 1, zero or negative decides 0. The source
// names the SUM and H.D blocks and decides on the sum of the two decoders'
// LLRs; the tie rule is this design's choice. Inputs are {L(u2), L(u1)},
// 9 bits each. Combinational.
module sum_hd
  import turbo_pkg::*;
(
  input  logic [2*LQ-1:0] l_dec1,
  input  logic [2*LQ-1:0] l_dec2,
  output logic [1:0]      u        // {u2, u1} of the pair
);

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      logic signed [LQ:0] s;
      s = (LQ+1)'(signed'(l_dec1[b*LQ +: LQ])) + (LQ+1)'(signed'(l_dec2[b*LQ +: LQ]));
      u[b] = (s > 0);
    end
  end

endmodule
