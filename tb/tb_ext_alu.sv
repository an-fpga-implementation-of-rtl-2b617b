// tb_ext_alu: extrinsic words and bit LLRs against the formulas
// e[n] = LLRn - (u1*I1 + u2*I2) - Ex_in[n], Ex_out[n] = sat9(e[n] - e[0]),
// L(u1) = max(LLR1,LLR3) - max(LLR0,LLR2), L(u2) = max(LLR2,LLR3) - max(LLR0,LLR1).
module tb_ext_alu;
  import turbo_pkg::*;
  import tb_rsc_pkg::*;
  llr4_t llr;
  rq_t i1, i2;
  ex_t ex_in, ex_out;
  llr_t l_u1, l_u2;
  int checks = 0, failures = 0;

  ext_alu dut (.*);

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin
    int l [4], x [4], s1, s2, e [4], got [4];
    for (int it = 0; it < 3000; it++) begin
      for (int n = 0; n < 4; n++) begin l[n] = -int'($urandom_range(256)); llr[n] = 9'(l[n]); end
      for (int n = 0; n < 4; n++) x[n] = (n == 0) ? 0 : int'($urandom_range(400)) - 200;
      s1 = int'($urandom_range(255)) - 128; s2 = int'($urandom_range(255)) - 128;
      i1 = 8'(s1); i2 = 8'(s2);
      ex_in = '{ex0: 9'(x[0]), ex1: 9'(x[1]), ex2: 9'(x[2]), ex3: 9'(x[3])};
      #1;
      for (int n = 0; n < 4; n++) e[n] = l[n] - x[n] - (n[0] ? s1 : 0) - (n[1] ? s2 : 0);
      got[0] = ex_out.ex0; got[1] = ex_out.ex1; got[2] = ex_out.ex2; got[3] = ex_out.ex3;
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (got[n] != satv(e[n] - e[0], 9)) begin failures++; if (failures < 10) $display("FAIL ex%0d %0d vs %0d", n, got[n], satv(e[n]-e[0], 9)); end
      end
      checks += 2;
      if (int'(l_u1) != satv(mx(l[1], l[3]) - mx(l[0], l[2]), 9)) failures++;
      if (int'(l_u2) != satv(mx(l[2], l[3]) - mx(l[0], l[1]), 9)) failures++;
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
