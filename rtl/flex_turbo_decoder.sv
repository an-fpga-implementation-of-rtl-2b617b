// flex_turbo_decoder: flexible high-speed turbo decoder, half-rate QPSK or
// two-thirds-rate 8-PSK (turbo-coded pragmatic TCM) on one binary decoder.
//
// Data path:
//  * Input selector: in the 8-PSK mode each received sample goes through the
//    coset symbol transformer, which folds it onto QPSK, and through the
//    phase sector quantizer, whose 3-bit sector is buffered for the block.
//    In the QPSK mode the sample is used as it is.
//  * Demux: symbol k carries the systematic value x' of information bit k
//    and a parity value y'. Even symbols carry RSC1 parity (first bit of a
//    natural pair), odd symbols RSC2 parity (second bit of an interleaved
//    pair); the other parity positions of each decoder are punctured and
//    read as zero. Pairs are written to two received-symbol RAMs (128 x 32):
//    DEC1's in natural order, DEC2's with its parity at the interleaved
//    address so that DEC2 reads both through the interleaver.
//  * Parallel decoder: DEC1 and DEC2, two radix-4 dual-path MAP decoders,
//    run at the same time in every iteration, each using as a-priori input
//    the extrinsic information the other produced in the previous iteration
//    (none in the first). The extrinsic words go to ping-pong pairs of
//    128 x 36 RAMs; DEC2 reads and writes through the interleaver address,
//    so its results are stored de-interleaved.
//  * HDA early stop: after each iteration the hard decisions of DEC1 and
//    DEC2 are compared; decoding stops when they agree (early_stop_en) or
//    after MAX_ITER iterations.
//  * Output: the bit LLRs of both decoders are summed and sliced (SUM, H.D);
//    the re-encoder rebuilds each symbol's coded bit; the uncoded-bit
//    decision turns it and the stored phase sector into u2; the pairs leave
//    in natural order (P/S), four bits per clock.
//
// Interface: in_valid/in_ready accept one received sample per clock, N per
// block. After decoding, out_valid is high for K = N/2 clocks, each carrying
// out_bits = {u2[2n+1], u1[2n+1], u2[2n], u1[2n]}; u2 is 0 in the QPSK mode.
// iterations and decode_cycles describe the last block. mode_8psk and
// early_stop_en are sampled while a block is loaded and must stay constant
// for the block.
//
// Timing: one iteration takes K + 4 clocks (K pair steps, three pipeline
// clocks, one clock for the stopping decision), so three iterations of
// N = 212 take 330 clocks. The structure (selector, transformer, quantizer,
// parallel radix-4 dual-path decoders, HDA, SUM, re-encoder, UCD, P/S) and
// the sizes follow the design; the puncturing pattern, the interleaver, the
// memory layout of the exchange and the handshakes are this design's own.
module flex_turbo_decoder
  import turbo_pkg::*;
#(
  parameter int N        = 212,
  parameter int MAX_ITER = 3,
  parameter int ILV_P    = 33,
  parameter int ILV_S    = 5,
  localparam int K  = N / 2,
  localparam int AW = $clog2(K)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode_8psk,
  input  logic        early_stop_en,
  input  logic        in_valid,
  output logic        in_ready,
  input  rq_t         in_x,
  input  rq_t         in_y,
  output logic        out_valid,
  output logic [3:0]  out_bits,
  output logic        out_last,
  output logic [3:0]  iterations,
  output logic [15:0] decode_cycles,
  output logic        busy
);

  localparam int DEPTH = 1 << AW;

  typedef enum logic [2:0] {S_LOAD, S_DSTART, S_DRUN, S_DCHECK, S_OUT, S_ODRAIN} state_t;
  state_t state;

  // ---------------- input selector, CST, PSQ and demux ----------------
  rq_t           cst_x, cst_y;
  logic [2:0]    sector;
  logic          mode_r, es_r;
  logic          ld_sym, ld_first, ld_pair, ld_last;
  logic [AW-1:0] ld_n;
  logic [2*RQ-1:0] ld_sys;
  rq_t           ld_par1, ld_par2;
  logic [5:0]    ph_wd;

  coset_transformer #(.W(RQ)) u_cst (.x(in_x), .y(in_y), .xq(cst_x), .yq(cst_y));
  psq               #(.W(RQ)) u_psq (.x(in_x), .y(in_y), .sector(sector));

  assign in_ready = (state == S_LOAD);
  assign ld_sym   = in_valid && in_ready;

  rx_demux #(.K(K)) u_demux (
    .clk(clk), .rst_n(rst_n), .mode_8psk(mode_8psk), .accept(ld_sym),
    .in_x(in_x), .in_y(in_y), .cst_x(cst_x), .cst_y(cst_y), .sector(sector),
    .first(ld_first), .pair_we(ld_pair), .pair_n(ld_n),
    .sys_pair(ld_sys), .par1(ld_par1), .par2(ld_par2), .phase(ph_wd),
    .last_pair(ld_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_r <= 1'b0;
      es_r   <= 1'b0;
    end else if (ld_first) begin
      mode_r <= mode_8psk;
      es_r   <= early_stop_en;
    end
  end

  // ---------------- interleaver address generator ----------------
  logic          ilv_start, ilv_step;
  logic [AW-1:0] ilv_f, ilv_b;

  interleaver_addr #(.K(K), .P(ILV_P), .S(ILV_S)) u_ilv (
    .clk(clk), .rst_n(rst_n), .start(ilv_start), .step(ilv_step),
    .fwd_addr(ilv_f), .bwd_addr(ilv_b)
  );

  // ---------------- component decoders ----------------
  logic          m_start, m1_done, m2_done, m1_busy, m2_busy;
  logic          m1_rd, m2_rd;
  logic [AW-1:0] m1_kf, m1_kb, m2_kf, m2_kb;
  sym_t          rx1_a, rx1_b, rx2_a, rx2_b;
  ex_t           m1_exf, m1_exb, m2_exf, m2_exb;
  logic [AW-1:0] tag1_f, tag1_b, tag2_f, tag2_b;
  logic          m1_wf, m1_wb, m2_wf, m2_wb;
  logic [AW-1:0] m1_wfk, m1_wbk, m2_wfk, m2_wbk;
  logic [AW-1:0] m1_wft, m1_wbt, m2_wft, m2_wbt;
  ex_t           m1_wfx, m1_wbx, m2_wfx, m2_wbx;
  llr_t          m1_wf1, m1_wf2, m1_wb1, m1_wb2, m2_wf1, m2_wf2, m2_wb1, m2_wb2;

  map_r4dp #(.K(K)) u_dec1 (
    .clk(clk), .rst_n(rst_n), .start(m_start), .beta_term(1'b1),
    .rd_en(m1_rd), .kf(m1_kf), .kb(m1_kb),
    .sym_f(rx1_a), .ex_f(m1_exf), .tag_f(tag1_f),
    .sym_b(rx1_b), .ex_b(m1_exb), .tag_b(tag1_b),
    .wf_en(m1_wf), .wf_k(m1_wfk), .wf_tag(m1_wft), .wf_ex(m1_wfx), .wf_l1(m1_wf1), .wf_l2(m1_wf2),
    .wb_en(m1_wb), .wb_k(m1_wbk), .wb_tag(m1_wbt), .wb_ex(m1_wbx), .wb_l1(m1_wb1), .wb_l2(m1_wb2),
    .busy(m1_busy), .done(m1_done)
  );

  map_r4dp #(.K(K)) u_dec2 (
    .clk(clk), .rst_n(rst_n), .start(m_start), .beta_term(1'b0),
    .rd_en(m2_rd), .kf(m2_kf), .kb(m2_kb),
    .sym_f(rx2_a), .ex_f(m2_exf), .tag_f(tag2_f),
    .sym_b(rx2_b), .ex_b(m2_exb), .tag_b(tag2_b),
    .wf_en(m2_wf), .wf_k(m2_wfk), .wf_tag(m2_wft), .wf_ex(m2_wfx), .wf_l1(m2_wf1), .wf_l2(m2_wf2),
    .wb_en(m2_wb), .wb_k(m2_wbk), .wb_tag(m2_wbt), .wb_ex(m2_wbx), .wb_l1(m2_wb1), .wb_l2(m2_wb2),
    .busy(m2_busy), .done(m2_done)
  );

  // Tags: the address each result is written to (DEC2: interleaved address).
  always_ff @(posedge clk) begin
    tag1_f <= m1_kf;
    tag1_b <= m1_kb;
    tag2_f <= ilv_f;
    tag2_b <= ilv_b;
  end

  // ---------------- received-symbol RAMs ----------------
  // Lanes of a sym_t word: 3 = I1, 2 = I2, 1 = Q1, 0 = Q2.
  logic [AW-1:0] out_t;

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(32), .LANES(4)) u_rx1 (
    .clk(clk),
    .a_we(ld_pair ? 4'b1111 : 4'b0000), .a_addr(ld_pair ? ld_n : m1_kf),
    .a_wdata({ld_sys, ld_par1, rq_t'(0)}), .a_rdata(rx1_a),
    .b_we(4'b0000), .b_addr(m1_kb), .b_wdata('0), .b_rdata(rx1_b)
  );

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(32), .LANES(4)) u_rx2 (
    .clk(clk),
    .a_we(ld_pair ? 4'b1100 : 4'b0000), .a_addr(ld_pair ? ld_n : ilv_f),
    .a_wdata({ld_sys, (2*RQ)'(0)}), .a_rdata(rx2_a),
    .b_we(ld_pair ? 4'b0011 : 4'b0000), .b_addr(ld_pair ? ilv_f : ilv_b),
    .b_wdata({(2*RQ)'(0), rq_t'(0), ld_par2}), .b_rdata(rx2_b)
  );

  // Phase sectors of the two symbols of each pair: {sector[2n+1], sector[2n]}.
  logic [5:0] ph_rd;

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(6)) u_phase (
    .clk(clk),
    .a_we(ld_pair), .a_addr(ld_pair ? ld_n : out_t), .a_wdata(ph_wd), .a_rdata(ph_rd),
    .b_we(1'b0), .b_addr('0), .b_wdata('0), .b_rdata()
  );

  // ---------------- extrinsic exchange RAMs (ping-pong) ----------------
  // ext1[b]: written by DEC1 at natural addresses, read by DEC2 through the
  // interleaver. ext2[b]: written by DEC2 at interleaved addresses, read by
  // DEC1 in natural order. Iteration i writes bank i%2 and reads the other.
  logic [3:0] iter;
  logic       wbank;
  logic       first_iter;
  assign wbank      = iter[0];
  assign first_iter = (iter == '0);

  ex_t e1_a [2], e1_b [2], e2_a [2], e2_b [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    wire wr = (wbank == 1'(b));
    tdp_ram #(.DEPTH(DEPTH), .WIDTH(36)) u_ext1 (
      .clk(clk),
      .a_we(wr && m1_wf), .a_addr(wr ? m1_wft : ilv_f), .a_wdata(m1_wfx), .a_rdata(e1_a[b]),
      .b_we(wr && m1_wb), .b_addr(wr ? m1_wbt : ilv_b), .b_wdata(m1_wbx), .b_rdata(e1_b[b])
    );
    tdp_ram #(.DEPTH(DEPTH), .WIDTH(36)) u_ext2 (
      .clk(clk),
      .a_we(wr && m2_wf), .a_addr(wr ? m2_wft : m1_kf), .a_wdata(m2_wfx), .a_rdata(e2_a[b]),
      .b_we(wr && m2_wb), .b_addr(wr ? m2_wbt : m1_kb), .b_wdata(m2_wbx), .b_rdata(e2_b[b])
    );
  end

  assign m1_exf = first_iter ? ex_t'(0) : e2_a[!wbank];
  assign m1_exb = first_iter ? ex_t'(0) : e2_b[!wbank];
  assign m2_exf = first_iter ? ex_t'(0) : e1_a[!wbank];
  assign m2_exb = first_iter ? ex_t'(0) : e1_b[!wbank];

  // ---------------- decision buffers and hard decisions ----------------
  logic [17:0] d1_a, d1_b, d2_a, d2_b;
  logic [N-1:0] hd1, hd2;

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(18)) u_dec1_llr (
    .clk(clk),
    .a_we(m1_wf), .a_addr(m1_wf ? m1_wft : out_t), .a_wdata({m1_wf2, m1_wf1}), .a_rdata(d1_a),
    .b_we(m1_wb), .b_addr(m1_wb ? m1_wbt : ilv_f), .b_wdata({m1_wb2, m1_wb1}), .b_rdata(d1_b)
  );

  tdp_ram #(.DEPTH(DEPTH), .WIDTH(18)) u_dec2_llr (
    .clk(clk),
    .a_we(m2_wf), .a_addr(m2_wf ? m2_wft : out_t), .a_wdata({m2_wf2, m2_wf1}), .a_rdata(d2_a),
    .b_we(m2_wb), .b_addr(m2_wb ? m2_wbt : ilv_f), .b_wdata({m2_wb2, m2_wb1}), .b_rdata(d2_b)
  );

  always_ff @(posedge clk) begin
    if (m1_wf) hd1[2*m1_wft +: 2] <= {m1_wf2 > 0, m1_wf1 > 0};
    if (m1_wb) hd1[2*m1_wbt +: 2] <= {m1_wb2 > 0, m1_wb1 > 0};
    if (m2_wf) hd2[2*m2_wft +: 2] <= {m2_wf2 > 0, m2_wf1 > 0};
    if (m2_wb) hd2[2*m2_wbt +: 2] <= {m2_wb2 > 0, m2_wb1 > 0};
  end

  // ---------------- HDA early stop ----------------
  logic       hda_check, hda_stop, hda_agree;
  logic [3:0] hda_iters;

  assign hda_check = (state == S_DCHECK);

  hda_early_stop #(.NBITS(N), .MAX_ITER(MAX_ITER)) u_hda (
    .clk(clk), .rst_n(rst_n), .start(state == S_LOAD), .en(es_r), .check(hda_check),
    .hd1(hd1), .hd2(hd2), .agree(hda_agree), .stop(hda_stop), .iter_done(hda_iters)
  );

  // ---------------- output: SUM, H.D, re-encoder, UCD, P/S ----------------
  logic          o_v1;
  logic [AW-1:0] o_t1;
  logic [1:0]    u_nat, u_int, c_re;
  logic [1:0]    u2_hat;

  sum_hd u_sum_nat (.l_dec1(d1_a), .l_dec2(d2_a), .u(u_nat));   // pair n
  sum_hd u_sum_int (.l_dec1(d1_b), .l_dec2(d2_b), .u(u_int));   // pair pi(n)

  re_encoder u_reenc (
    .clk(clk), .rst_n(rst_n), .start(state == S_DCHECK), .en(o_v1),
    .u_nat(u_nat), .u_int(u_int), .c(c_re)
  );

  ucd u_ucd0 (.u1(u_nat[0]), .c(c_re[0]), .sector(ph_rd[2:0]), .u2(u2_hat[0]));
  ucd u_ucd1 (.u1(u_nat[1]), .c(c_re[1]), .sector(ph_rd[5:3]), .u2(u2_hat[1]));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_bits  <= '0;
    end else begin
      out_valid <= o_v1;
      out_last  <= o_v1 && (int'(o_t1) == K - 1);
      out_bits  <= {u2_hat[1] & mode_r, u_nat[1], u2_hat[0] & mode_r, u_nat[0]};
    end
  end

  // ---------------- control ----------------
  assign m_start   = (state == S_DSTART);
  assign ilv_start = (state == S_DSTART) || (state == S_DCHECK && hda_stop) || (state == S_ODRAIN) ||
                     (state == S_LOAD && ld_last);
  assign ilv_step  = (state == S_LOAD) ? ld_pair :
                     (state == S_DRUN) ? m2_rd :
                     (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_LOAD;
      iter          <= '0;
      out_t         <= '0;
      o_v1          <= 1'b0;
      o_t1          <= '0;
      iterations    <= '0;
      decode_cycles <= '0;
    end else begin
      o_v1 <= (state == S_OUT);
      o_t1 <= out_t;
      if (state == S_DSTART || state == S_DRUN || state == S_DCHECK)
        decode_cycles <= decode_cycles + 16'd1;
      unique case (state)
        S_LOAD: begin
          iter <= '0;
          if (ld_last) begin
            state         <= S_DSTART;
            decode_cycles <= '0;
          end
        end
        S_DSTART: state <= S_DRUN;
        S_DRUN:   if (m1_done) state <= S_DCHECK;
        S_DCHECK: begin
          iter <= iter + 4'd1;
          if (hda_stop) begin
            state      <= S_OUT;
            out_t      <= '0;
            iterations <= hda_iters + 4'd1;
          end else begin
            state <= S_DSTART;
          end
        end
        S_OUT: begin
          out_t <= out_t + 1'b1;
          if (int'(out_t) == K - 1) state <= S_ODRAIN;
        end
        S_ODRAIN: if (!o_v1) state <= S_LOAD;
        default:  state <= S_LOAD;
      endcase
    end
  end

  assign busy = (state != S_LOAD) || (ld_n != '0) || m1_busy || m2_busy;

  // Both component decoders run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) m1_done == m2_done);
  assert property (@(posedge clk) disable iff (!rst_n) m1_rd == m2_rd);
  assert property (@(posedge clk) disable iff (!rst_n) m1_rd |-> (m1_kf == m2_kf && m1_kb == m2_kb));
  assert property (@(posedge clk) disable iff (!rst_n) m1_wf |-> (m2_wf && m1_wfk == m2_wfk));
  assert property (@(posedge clk) disable iff (!rst_n) m1_wb |-> (m2_wb && m1_wbk == m2_wbk));

endmodule
