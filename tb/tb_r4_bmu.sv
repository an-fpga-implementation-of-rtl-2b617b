// tb_r4_bmu: the 16 branch metrics against the formula
// bm[u1 p1 u2 p2] = sat9(u1*I1 + p1*Q1 + u2*I2 + p2*Q2 + Ex[2*u2+u1]) for random
// inputs, small and full-scale (to exercise saturation).
module tb_r4_bmu;
  import turbo_pkg::*;
  import tb_rsc_pkg::*;
  sym_t sym;
  ex_t ex;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  r4_bmu dut (.sym(sym), .ex(ex), .bm(bm));

  initial begin
    int v, e [4], s [4], nsat = 0;
    for (int it = 0; it < 2000; it++) begin
      int sc;
      sc = (it % 2) ? 255 : 60;
      for (int i = 0; i < 4; i++) s[i] = int'($urandom_range(sc)) - sc / 2;
      for (int i = 0; i < 4; i++) e[i] = int'($urandom_range(2 * sc)) - sc;
      for (int i = 0; i < 4; i++) s[i] = satv(s[i], 8);
      for (int i = 0; i < 4; i++) e[i] = satv(e[i], 9);
      sym = '{i1: 8'(s[0]), i2: 8'(s[1]), q1: 8'(s[2]), q2: 8'(s[3])};
      ex = '{ex0: 9'(e[0]), ex1: 9'(e[1]), ex2: 9'(e[2]), ex3: 9'(e[3])};
      #1;
      for (int u1 = 0; u1 < 2; u1++) for (int p1 = 0; p1 < 2; p1++)
      for (int u2 = 0; u2 < 2; u2++) for (int p2 = 0; p2 < 2; p2++) begin
        v = u1 * s[0] + p1 * s[2] + u2 * s[1] + p2 * s[3] + e[2 * u2 + u1];
        if (v != satv(v, 9)) nsat++;
        v = satv(v, 9);
        checks++;
        if (int'(bm[8 * u1 + 4 * p1 + 2 * u2 + p2]) != v) begin
          failures++;
          if (failures < 10) $display("FAIL bm%0d%0d%0d%0d = %0d expected %0d", u1, p1, u2, p2, bm[8*u1+4*p1+2*u2+p2], v);
        end
      end
    end
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL saturation never exercised"); end
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
