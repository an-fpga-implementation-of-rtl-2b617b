// r4_bmu: radix-4 branch metric unit (R4FBMu / R4BBMu).
//
// For one trellis pair it forms the 16 branch metrics bm0000..bm1111, one per
// codeword {u1, p1, u2, p2} of the two merged radix-2 steps:
//   bm[c] = u1*I1 + p1*Q1 + u2*I2 + p2*Q2 + Ex[2*u2 + u1]
// in the log domain, where a '1' bit adds its soft sample and a '0' bit adds
// nothing (a per-pair constant, which cancels in every comparison). Ex is the
// a-priori extrinsic information of the four pair values, zero in the first
// iteration. The sum is saturated to BQ = 9 bits. The same unit serves the
// forward and the backward recursion. Combinational.
module r4_bmu
  import turbo_pkg::*;
(
  input  sym_t    sym,
  input  ex_t     ex,
  output bm_vec_t bm
);

  always_comb begin
    logic signed [15:0] acc;
    llr_t a;
    for (int c = 0; c < 16; c++) begin
      unique case ({c[3], c[1]})          // pair value n = 2*u2 + u1
        2'b00:   a = ex.ex0;
        2'b10:   a = ex.ex1;
        2'b01:   a = ex.ex2;
        default: a = ex.ex3;
      endcase
      acc = 16'(a);
      if (c[3]) acc += 16'(sym.i1);
      if (c[2]) acc += 16'(sym.q1);
      if (c[1]) acc += 16'(sym.i2);
      if (c[0]) acc += 16'(sym.q2);
      bm[c] = bm_t'(sat(acc, BQ));
    end
  end

endmodule
