// turbo_pkg: types, sizes and trellis functions shared by the radix-4
// dual-path turbo decoder.
//
// Component code: 8-state recursive systematic convolutional (RSC) code,
// constraint length 4, feedback polynomial 15 (octal) and parity polynomial
// 17 (octal). The decoder works on pairs of information bits (radix-4), so one
// trellis step consumes the pair (u1, u2) and produces the codeword
// {u1, p1, u2, p2}. Pair value n = 2*u2 + u1 indexes the four pair LLRs and
// extrinsic values; codeword index {u1,p1,u2,p2} (u1 is the MSB) indexes the
// 16 branch metrics bm0000..bm1111.
//
// Widths follow the fixed-point study of the design: 8-bit received samples,
// 9-bit branch metrics, state metrics and LLRs, all saturating.
package turbo_pkg;

  localparam int RQ = 8;   // received I/Q sample width
  localparam int BQ = 9;   // branch metric width
  localparam int SQ = 9;   // state metric width
  localparam int LQ = 9;   // LLR / extrinsic width

  localparam int NSTATES = 8;
  localparam logic [3:0] G_FB = 4'o15;  // feedback, bit 3 = D^0 ... bit 0 = D^3
  localparam logic [3:0] G_FF = 4'o17;  // parity

  typedef logic signed [RQ-1:0] rq_t;
  typedef logic signed [BQ-1:0] bm_t;
  typedef logic signed [SQ-1:0] sm_t;
  typedef logic signed [LQ-1:0] llr_t;

  typedef bm_t  bm_vec_t [16];
  typedef sm_t  sm_vec_t [NSTATES];
  typedef llr_t llr4_t   [4];

  // One received trellis pair: systematic samples I1, I2 and parity Q1, Q2.
  typedef struct packed {
    rq_t i1;
    rq_t i2;
    rq_t q1;
    rq_t q2;
  } sym_t;                              // 32 bits, one word of the 128x32 RAM

  // Extrinsic word of the 128x36 RAM: Ex3..Ex0, 9 bits each.
  typedef struct packed {
    llr_t ex3;
    llr_t ex2;
    llr_t ex1;
    llr_t ex0;
  } ex_t;

  localparam sm_t SM_MIN = sm_t'(-(1 << (SQ-1)));

  // One radix-2 step of the RSC encoder. State bit 0 is the newest register.
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ (G_FB[2] & s[0]) ^ (G_FB[1] & s[1]) ^ (G_FB[0] & s[2]);
    return {s[1:0], a};
  endfunction

  function automatic logic rsc_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ (G_FB[2] & s[0]) ^ (G_FB[1] & s[1]) ^ (G_FB[0] & s[2]);
    return (G_FF[3] & a) ^ (G_FF[2] & s[0]) ^ (G_FF[1] & s[1]) ^ (G_FF[0] & s[2]);
  endfunction

  // Radix-4 step: state after the pair n = {u2,u1}.
  function automatic logic [2:0] r4_next(input logic [2:0] s, input logic [1:0] n);
    return rsc_next(rsc_next(s, n[0]), n[1]);
  endfunction

  // Radix-4 step: codeword index {u1,p1,u2,p2} of the pair n from state s.
  function automatic logic [3:0] r4_cw(input logic [2:0] s, input logic [1:0] n);
    logic [2:0] s1;
    s1 = rsc_next(s, n[0]);
    return {n[0], rsc_par(s, n[0]), n[1], rsc_par(s1, n[1])};
  endfunction

  // Saturate a wide signed value to W bits (returned sign-extended in 16 bits).
  function automatic logic signed [15:0] sat(input logic signed [15:0] v, input int w);
    logic signed [15:0] hi, lo;
    hi = 16'sd1 <<< (w - 1);
    hi = hi - 16'sd1;
    lo = -(16'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
