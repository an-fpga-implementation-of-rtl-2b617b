// tb_r4_llru: pair LLRs LLRn = max_s alpha[s] + bm[cw(s,n)] + beta[next(s,n)],
// normalised to a maximum of 0 and saturated to 9 bits, against a reference
// using the shift-register encoder model, for random metrics.
module tb_r4_llru;
  import turbo_pkg::*;
  import tb_rsc_pkg::*;
  sm_vec_t alpha, beta;
  bm_vec_t bm;
  llr4_t llr;
  int checks = 0, failures = 0;

  r4_llru dut (.alpha(alpha), .bm(bm), .beta(beta), .llr(llr));

  initial begin
    int a [8], bt [8], b [16], e [4], mx;
    for (int it = 0; it < 1500; it++) begin
      for (int s = 0; s < 8; s++) begin
        a[s] = -int'($urandom_range(it % 2 ? 256 : 80)); bt[s] = -int'($urandom_range(it % 2 ? 256 : 80));
        alpha[s] = 9'(a[s]); beta[s] = 9'(bt[s]);
      end
      for (int c = 0; c < 16; c++) begin b[c] = int'($urandom_range(500)) - 250; bm[c] = 9'(b[c]); end
      #1;
      for (int n = 0; n < 4; n++) begin
        e[n] = -100000;
        for (int s = 0; s < 8; s++) begin
          rsc_t r;
          bit p1, p2;
          int cw, v;
          r = from_int(s);
          p1 = step(r, n[0]);
          p2 = step(r, n[1]);
          cw = 8 * n[0] + 4 * p1 + 2 * n[1] + p2;
          v = a[s] + b[cw] + bt[st(r)];
          if (v > e[n]) e[n] = v;
        end
      end
      mx = e[0];
      for (int n = 1; n < 4; n++) if (e[n] > mx) mx = e[n];
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (int'(llr[n]) != satv(e[n] - mx, 9)) begin failures++; if (failures < 10) $display("FAIL LLR%0d %0d vs %0d", n, llr[n], satv(e[n]-mx, 9)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
