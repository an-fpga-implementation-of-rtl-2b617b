// r4_llru: radix-4 LLR unit (FLLRu / BLLRu).
//
// For one trellis pair it forms the log-likelihood of each of the four pair
// values n = 2*u2 + u1 (LLR0..LLR3):
//   LLRn = max over s of alpha_k[s] + bm[r4_cw(s,n)] + beta_k+1[r4_next(s,n)]
// (max-log form; the design writes the ratio of sums). The four values are
// normalised so the largest is 0 and saturated to LQ = 9 bits. The forward
// unit uses the running alpha with beta read back from the backward state
// metric RAM, the backward unit the running beta with alpha read back from
// the forward RAM; the arithmetic is the same. Combinational.
module r4_llru
  import turbo_pkg::*;
(
  input  sm_vec_t alpha,
  input  bm_vec_t bm,
  input  sm_vec_t beta,
  output llr4_t   llr
);

  always_comb begin
    logic signed [15:0] acc [4];
    logic signed [15:0] cand, mx;
    for (int n = 0; n < 4; n++) begin
      acc[n] = -16'sd32000;
      for (int s = 0; s < NSTATES; s++) begin
        cand = 16'(alpha[s]) + 16'(bm[r4_cw(3'(s), 2'(n))]) + 16'(beta[r4_next(3'(s), 2'(n))]);
        if (cand > acc[n]) acc[n] = cand;
      end
    end
    mx = acc[0];
    for (int n = 1; n < 4; n++) if (acc[n] > mx) mx = acc[n];
    for (int n = 0; n < 4; n++) llr[n] = llr_t'(sat(acc[n] - mx, LQ));
  end

endmodule
