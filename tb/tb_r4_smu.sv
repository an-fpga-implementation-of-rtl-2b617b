// tb_r4_smu: one radix-4 add-compare-select step, forward and backward, against
// a reference that expands every state and pair through two shift-register
// encoder steps, takes the max per state, subtracts the overall max and
// saturates to 9 bits. Random metrics, including saturated ones.
module tb_r4_smu;
  import turbo_pkg::*;
  import tb_rsc_pkg::*;
  sm_vec_t a_in, a_out, b_in, b_out;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  r4_smu #(.BACKWARD(1'b0)) dut_f (.sm_in(a_in), .bm(bm), .sm_out(a_out));
  r4_smu #(.BACKWARD(1'b1)) dut_b (.sm_in(b_in), .bm(bm), .sm_out(b_out));

  initial begin
    int ef [8], eb [8], mf, mb, b [16], ai [8], bi [8];
    for (int it = 0; it < 1500; it++) begin
      for (int s = 0; s < 8; s++) begin
        ai[s] = -int'($urandom_range(it % 3 == 0 ? 256 : 60));
        bi[s] = -int'($urandom_range(it % 3 == 0 ? 256 : 60));
        ai[s] = satv(ai[s], 9); bi[s] = satv(bi[s], 9);
        a_in[s] = 9'(ai[s]); b_in[s] = 9'(bi[s]);
      end
      for (int c = 0; c < 16; c++) begin b[c] = int'($urandom_range(500)) - 250; bm[c] = 9'(b[c]); end
      #1;
      for (int s = 0; s < 8; s++) begin ef[s] = -100000; eb[s] = -100000; end
      for (int s = 0; s < 8; s++) for (int n = 0; n < 4; n++) begin
        rsc_t r;
        bit p1, p2;
        int cw, ns;
        r = from_int(s);
        p1 = step(r, n[0]);
        p2 = step(r, n[1]);
        ns = st(r);
        cw = 8 * n[0] + 4 * p1 + 2 * n[1] + p2;
        if (ai[s] + b[cw] > ef[ns]) ef[ns] = ai[s] + b[cw];
        if (bi[ns] + b[cw] > eb[s]) eb[s] = bi[ns] + b[cw];
      end
      mf = ef[0]; mb = eb[0];
      for (int s = 1; s < 8; s++) begin if (ef[s] > mf) mf = ef[s]; if (eb[s] > mb) mb = eb[s]; end
      for (int s = 0; s < 8; s++) begin
        checks += 2;
        if (int'(a_out[s]) != satv(ef[s] - mf, 9)) begin failures++; if (failures < 10) $display("FAIL fwd s%0d %0d vs %0d", s, a_out[s], satv(ef[s]-mf, 9)); end
        if (int'(b_out[s]) != satv(eb[s] - mb, 9)) begin failures++; if (failures < 10) $display("FAIL bwd s%0d %0d vs %0d", s, b_out[s], satv(eb[s]-mb, 9)); end
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
