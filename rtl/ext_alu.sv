// ext_alu: extrinsic-information ALU of a component decoder ("LLR + ICH - EX").
//
// From the four pair LLRs it removes what the decoder was given, the
// systematic (I-channel) samples and the a-priori extrinsic values, to leave
// the extrinsic information passed to the other decoder:
//   e[n]  = LLRn - (u1*I1 + u2*I2) - Ex_in[n],   n = 2*u2 + u1
//   Ex_out[n] = sat9(e[n] - e[0])      (so Ex_out[0] = 0)
// The reference to pair value 0 and the 9-bit saturation are this design's
// choices. It also gives the two bit LLRs used for the hard decisions:
//   L(u1) = max(LLR1, LLR3) - max(LLR0, LLR2)
//   L(u2) = max(LLR2, LLR3) - max(LLR0, LLR1)
// saturated to 9 bits; a positive value decides '1'. Combinational.
module ext_alu
  import turbo_pkg::*;
(
  input  llr4_t       llr,
  input  rq_t         i1,
  input  rq_t         i2,
  input  ex_t         ex_in,
  output ex_t         ex_out,
  output llr_t        l_u1,
  output llr_t        l_u2
);

  function automatic logic signed [15:0] max2(input logic signed [15:0] a, b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    logic signed [15:0] e [4];
    logic signed [15:0] xin [4];
    xin[0] = 16'(ex_in.ex0);
    xin[1] = 16'(ex_in.ex1);
    xin[2] = 16'(ex_in.ex2);
    xin[3] = 16'(ex_in.ex3);
    for (int n = 0; n < 4; n++) begin
      e[n] = 16'(llr[n]) - xin[n];
      if (n[0]) e[n] -= 16'(i1);
      if (n[1]) e[n] -= 16'(i2);
    end
    ex_out.ex0 = '0;
    ex_out.ex1 = llr_t'(sat(e[1] - e[0], LQ));
    ex_out.ex2 = llr_t'(sat(e[2] - e[0], LQ));
    ex_out.ex3 = llr_t'(sat(e[3] - e[0], LQ));
    l_u1 = llr_t'(sat(max2(16'(llr[1]), 16'(llr[3])) - max2(16'(llr[0]), 16'(llr[2])), LQ));
    l_u2 = llr_t'(sat(max2(16'(llr[2]), 16'(llr[3])) - max2(16'(llr[0]), 16'(llr[1])), LQ));
  end

endmodule
