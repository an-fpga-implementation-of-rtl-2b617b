// tb_map_r4dp: one radix-4 dual-path component decoder at K = 106 pairs.
// The testbench plays the received-symbol and extrinsic RAMs: it answers each
// pair request one clock later. Blocks are encoded with the shift-register
// RSC model (terminated by the last three bits, both parity bits sent).
// Checked: every pair gets exactly one result, forward results come for
// pairs H..K-1 in rising order and backward results for H-1..0 in falling
// order, two clocks after the request, tags pass through, done comes
// K + 2 clocks after start, and the hard decisions of the bit LLRs equal the
// information bits: (1) from the channel alone, with noise; (2) from a-priori
// extrinsic values alone (all channel samples zero), which exercises the
// extrinsic input path; (3) unterminated start of beta.
module tb_map_r4dp;
  import turbo_pkg::*;
  import tb_rsc_pkg::*;
  localparam int K = 106, H = K / 2;
  logic clk = 0, rst_n = 0, start = 0, beta_term = 1;
  always #5 clk = ~clk;

  logic rd_en, wf_en, wb_en, busy, done;
  logic [6:0] kf, kb, tag_f, tag_b, wf_k, wb_k, wf_tag, wb_tag;
  sym_t sym_f, sym_b;
  ex_t ex_f, ex_b, wf_ex, wb_ex;
  llr_t wf_l1, wf_l2, wb_l1, wb_l2;

  map_r4dp #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  sym_t rx [K];
  ex_t  apr [K];
  bit   u [2*K];
  int   got [K];
  int   cyc, t_start, t_done, last_f, last_b;

  always @(posedge clk) cyc <= cyc + 1;

  // RAM model: registered read
  always_ff @(posedge clk) begin
    sym_f <= rx[kf];
    sym_b <= rx[kb];
    ex_f  <= apr[kf];
    ex_b  <= apr[kb];
    tag_f <= 7'd127 - kf;
    tag_b <= 7'd127 - kb;
  end

  function automatic int nz(int a);
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2 * a)) - a;
    return s / 2;
  endfunction

  function automatic rq_t q8(int v);
    return rq_t'(satv(v, 8));
  endfunction

  task automatic make_block(int amp, int noise, int prior);
    rsc_t r;
    bit p [2*K];
    r = from_int(0);
    for (int k = 0; k < 2 * K; k++) begin
      u[k] = 1'($urandom);
      if (k >= 2 * K - 3) u[k] = r.r1 ^ r.r3;
      p[k] = step(r, u[k]);
    end
    for (int n = 0; n < K; n++) begin
      rx[n].i1 = q8((u[2*n]   ? amp : -amp) + nz(noise));
      rx[n].i2 = q8((u[2*n+1] ? amp : -amp) + nz(noise));
      rx[n].q1 = q8((p[2*n]   ? amp : -amp) + nz(noise));
      rx[n].q2 = q8((p[2*n+1] ? amp : -amp) + nz(noise));
      // a priori: log-probability of pair value m relative to m = 0
      apr[n].ex0 = '0;
      apr[n].ex1 = 9'((u[2*n]   ? prior : 0) - (!u[2*n] && !u[2*n+1] ? 0 : 0));
      apr[n].ex2 = 9'((u[2*n+1] ? prior : 0));
      apr[n].ex3 = 9'((u[2*n] ? prior : 0) + (u[2*n+1] ? prior : 0));
      if (!u[2*n])   begin apr[n].ex1 = 9'(-prior); apr[n].ex3 = 9'(int'(apr[n].ex3) - prior); end
      if (!u[2*n+1]) begin apr[n].ex2 = 9'(-prior); apr[n].ex3 = 9'(int'(apr[n].ex3) - prior); end
    end
  endtask

  task automatic run(bit term, string name);
    int errs = 0, order = 0;
    for (int n = 0; n < K; n++) got[n] = 0;
    last_f = H - 1; last_b = H;
    beta_term = term;
    @(negedge clk);
    start = 1; t_start = cyc;
    @(negedge clk);
    start = 0;
    t_done = -1;
    while (t_done < 0) begin
      @(posedge clk); #1;
      if (wf_en) begin
        got[wf_k]++;
        if (int'(wf_k) != last_f + 1 || wf_tag != 7'd127 - wf_k) order++;
        last_f = wf_k;
        if ((wf_l1 > 0) != u[2*wf_k] || (wf_l2 > 0) != u[2*wf_k+1]) errs++;
      end
      if (wb_en) begin
        got[wb_k]++;
        if (int'(wb_k) != last_b - 1 || wb_tag != 7'd127 - wb_k) order++;
        last_b = wb_k;
        if ((wb_l1 > 0) != u[2*wb_k] || (wb_l2 > 0) != u[2*wb_k+1]) errs++;
      end
      if (done) t_done = cyc;
    end
    for (int n = 0; n < K; n++) if (got[n] != 1) order++;
    checks += 3;
    if (errs != 0)  begin failures++; $display("FAIL %s: %0d pair decision errors", name, errs); end
    if (order != 0) begin failures++; $display("FAIL %s: %0d order/coverage errors", name, order); end
    if (t_done - t_start != K + 2) begin failures++; $display("FAIL %s: done after %0d clocks", name, t_done - t_start); end
    $display("%s: errors=%0d order=%0d latency=%0d", name, errs, order, t_done - t_start);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    cyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    make_block(30, 0, 0);   run(1, "clean");
    make_block(30, 14, 0);  run(1, "noisy");
    make_block(0, 0, 40);   run(1, "a-priori only");
    make_block(30, 10, 0);  run(0, "beta unterminated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
