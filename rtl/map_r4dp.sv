// map_r4dp: radix-4 dual-path MAP component decoder (DEC1 / DEC2).
//
// Decodes one block of K trellis pairs (K = N/2 = 106 for N = 212 bits) in
// one pass of K clocks plus a short pipeline:
//  * radix-4: each clock advances a recursion by one pair of information
//    bits through the collapsed 8-state trellis (r4_smu);
//  * dual path: the forward recursion (alpha, pairs 0 -> K-1) and the
//    backward recursion (beta, pairs K-1 -> 0) run in the same clocks. For
//    the first half each stores its metrics, alpha in the forward state
//    metric RAM (pairs 0..H-1) and beta in the backward RAM (pairs H..K-1),
//    H = K/2. When they cross the middle, the forward LLR unit combines the
//    running alpha with beta read back from the backward RAM (pairs H..K-1)
//    and the backward LLR unit the running beta with alpha from the forward
//    RAM (pairs H-1..0). Each half-iteration therefore yields two pair
//    results per clock during its second half.
// Each pair result goes through the extrinsic ALU and leaves as the
// extrinsic word and two bit LLRs. alpha starts in state 0; beta starts in
// state 0 when beta_term is high (terminated trellis) and with all states
// equal otherwise.
//
// Interface and timing (clock c0 = the clock start is high):
//  * clocks c0+1 .. c0+K: rd_en is high and kf = t, kb = K-1-t (t = 0..K-1)
//    name the pairs whose received word and a-priori word are wanted; the
//    caller returns them (sym_f/ex_f for kf, sym_b/ex_b for kb) in the next
//    clock, as a synchronous RAM does, together with tag_f/tag_b, which are
//    passed through untouched to the results (the caller's write address).
//  * a result appears two clocks after its pair was read: wf_* for pairs
//    H..K-1 in rising order, wb_* for pairs H-1..0 in falling order.
//  * done is high in the clock that carries the last results (c0+K+2).
// The dual-path schedule, the RAM sizes (64 x 72) and the unit split follow
// the design; the pipeline registers and the tag pass-through are this
// design's own.
module map_r4dp
  import turbo_pkg::*;
#(
  parameter int K = 106,
  localparam int H  = K / 2,
  localparam int AW = $clog2(K),
  localparam int SAW = $clog2(H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          beta_term,
  // pair requests
  output logic          rd_en,
  output logic [AW-1:0] kf,
  output logic [AW-1:0] kb,
  // data for the pairs requested one clock earlier
  input  sym_t          sym_f,
  input  ex_t           ex_f,
  input  logic [AW-1:0] tag_f,
  input  sym_t          sym_b,
  input  ex_t           ex_b,
  input  logic [AW-1:0] tag_b,
  // forward-path results (pairs H..K-1)
  output logic          wf_en,
  output logic [AW-1:0] wf_k,
  output logic [AW-1:0] wf_tag,
  output ex_t           wf_ex,
  output llr_t          wf_l1,
  output llr_t          wf_l2,
  // backward-path results (pairs H-1..0)
  output logic          wb_en,
  output logic [AW-1:0] wb_k,
  output logic [AW-1:0] wb_tag,
  output ex_t           wb_ex,
  output llr_t          wb_l1,
  output llr_t          wb_l2,
  output logic          busy,
  output logic          done
);

  localparam int SMW = SQ * NSTATES;   // 72-bit state metric word

  function automatic logic [SMW-1:0] pack_sm(input sm_vec_t v);
    logic [SMW-1:0] w;
    for (int s = 0; s < NSTATES; s++) w[s*SQ +: SQ] = v[s];
    return w;
  endfunction

  function automatic sm_vec_t unpack_sm(input logic [SMW-1:0] w);
    sm_vec_t v;
    for (int s = 0; s < NSTATES; s++) v[s] = sm_t'(w[s*SQ +: SQ]);
    return v;
  endfunction

  // ---------------- stage 0: request pairs ----------------
  logic          run;
  logic [AW-1:0] t;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      t   <= '0;
    end else if (start) begin
      run <= 1'b1;
      t   <= '0;
    end else if (run) begin
      if (int'(t) == K - 1) run <= 1'b0;
      t <= t + 1'b1;
    end
  end

  assign rd_en = run;
  assign kf    = t;
  assign kb    = AW'(K - 1) - t;

  // ---------------- stage 1: branch and state metrics ----------------
  logic          v1;
  logic [AW-1:0] k1f, k1b;
  sm_vec_t       alpha, beta, alpha_nx, beta_nx;
  bm_vec_t       bm_f, bm_b;

  r4_bmu u_fbmu (.sym(sym_f), .ex(ex_f), .bm(bm_f));
  r4_bmu u_bbmu (.sym(sym_b), .ex(ex_b), .bm(bm_b));
  r4_smu #(.BACKWARD(1'b0)) u_fsmu (.sm_in(alpha), .bm(bm_f), .sm_out(alpha_nx));
  r4_smu #(.BACKWARD(1'b1)) u_bsmu (.sm_in(beta),  .bm(bm_b), .sm_out(beta_nx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1  <= 1'b0;
      k1f <= '0;
      k1b <= '0;
    end else begin
      v1  <= rd_en;
      k1f <= kf;
      k1b <= kb;
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      for (int s = 0; s < NSTATES; s++) begin
        alpha[s] <= (s == 0) ? sm_t'(0) : SM_MIN;
        beta[s]  <= (s == 0 || !beta_term) ? sm_t'(0) : SM_MIN;
      end
    end else if (v1) begin
      alpha <= alpha_nx;
      beta  <= beta_nx;
    end
  end

  wire f_store = v1 && (int'(k1f) <  H);   // forward, first half: store alpha_k
  wire b_store = v1 && (int'(k1b) >= H);   // backward, first half: store beta_k+1

  // State metric RAMs: port A writes the recursion, port B reads for the LLRs.
  logic [SMW-1:0] fsm_rd, bsm_rd;

  tdp_ram #(.DEPTH(1 << SAW), .WIDTH(SMW)) u_fsm_ram (
    .clk(clk),
    .a_we(f_store), .a_addr(SAW'(k1f)), .a_wdata(pack_sm(alpha)), .a_rdata(),
    .b_we(1'b0), .b_addr(SAW'(k1b)), .b_wdata('0), .b_rdata(fsm_rd)
  );

  tdp_ram #(.DEPTH(1 << SAW), .WIDTH(SMW)) u_bsm_ram (
    .clk(clk),
    .a_we(b_store), .a_addr(SAW'(int'(k1b) - H)), .a_wdata(pack_sm(beta)), .a_rdata(),
    .b_we(1'b0), .b_addr(SAW'(int'(k1f) - H)), .b_wdata('0), .b_rdata(bsm_rd)
  );

  // ---------------- stage 2 registers: LLR inputs ----------------
  logic          v2f, v2b;
  logic [AW-1:0] k2f, k2b, tg2f, tg2b;
  sm_vec_t       a2, b2;
  bm_vec_t       bm2f, bm2b;
  sym_t          s2f, s2b;
  ex_t           x2f, x2b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2f <= 1'b0;
      v2b <= 1'b0;
    end else begin
      v2f <= v1 && !f_store;
      v2b <= v1 && !b_store;
    end
  end

  always_ff @(posedge clk) begin
    k2f  <= k1f;   k2b  <= k1b;
    tg2f <= tag_f; tg2b <= tag_b;
    a2   <= alpha; b2   <= beta;
    bm2f <= bm_f;  bm2b <= bm_b;
    s2f  <= sym_f; s2b  <= sym_b;
    x2f  <= ex_f;  x2b  <= ex_b;
  end

  // ---------------- stage 2: LLRs and extrinsic ----------------
  llr4_t llr_f, llr_b;

  r4_llru u_fllru (.alpha(a2), .bm(bm2f), .beta(unpack_sm(bsm_rd)), .llr(llr_f));
  r4_llru u_bllru (.alpha(unpack_sm(fsm_rd)), .bm(bm2b), .beta(b2), .llr(llr_b));

  ext_alu u_falu (.llr(llr_f), .i1(s2f.i1), .i2(s2f.i2), .ex_in(x2f),
                  .ex_out(wf_ex), .l_u1(wf_l1), .l_u2(wf_l2));
  ext_alu u_balu (.llr(llr_b), .i1(s2b.i1), .i2(s2b.i2), .ex_in(x2b),
                  .ex_out(wb_ex), .l_u1(wb_l1), .l_u2(wb_l2));

  assign wf_en  = v2f;
  assign wf_k   = k2f;
  assign wf_tag = tg2f;
  assign wb_en  = v2b;
  assign wb_k   = k2b;
  assign wb_tag = tg2b;
  assign done   = v2f && (int'(k2f) == K - 1);
  assign busy   = run || v1 || v2f || v2b;

  // The two halves must meet: K even.
  initial assert (K % 2 == 0) else $error("K must be even");

endmodule
