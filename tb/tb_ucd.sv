// tb_ucd: exhaustive check of the uncoded-bit decision. For every label
// (u1, c), uncoded bit u2 and sector, the expected decision is the point
// (f or f+4) nearer to the sector centre, by real geometry; only the sectors
// adjacent to the transmitted point are required to decode correctly.
module tb_ucd;
  logic u1, c, u2;
  logic [2:0] sector;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  ucd dut (.u1(u1), .c(c), .sector(sector), .u2(u2));

  initial begin
    int f;
    real centre, d0;
    for (int l = 0; l < 4; l++) begin
      u1 = l[1]; c = l[0];
      f = (l == 0) ? 0 : (l == 2) ? 1 : (l == 3) ? 2 : 3;   // {u1,c}
      for (int s = 0; s < 8; s++) begin
        sector = 3'(s);
        #1;
        centre = (s + 0.5) * PI / 4.0;
        d0 = $cos(centre - f * PI / 4.0);    // > 0: nearer to point f
        checks++;
        if (u2 != (d0 > 0 ? 1'b0 : 1'b1)) begin
          failures++;
          $display("FAIL label %0d sector %0d -> %0d", l, s, u2);
        end
      end
      // the two sectors touching each transmitted point decode to its u2
      for (int b = 0; b < 2; b++) begin
        int m;
        m = f + 4 * b;
        for (int s2 = m - 1; s2 <= m; s2++) begin
          sector = 3'((s2 + 8) % 8);
          #1;
          checks++;
          if (u2 != 1'(b)) begin failures++; $display("FAIL point %0d sector %0d", m, sector); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
