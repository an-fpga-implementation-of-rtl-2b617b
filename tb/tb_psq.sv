// tb_psq: the 3-bit sector must equal floor(phase / (pi/4)) computed with
// real arithmetic, for random samples more than 1 degree from a border.
module tb_psq;
  logic signed [7:0] x, y;
  logic [2:0] sector;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  psq dut (.x(x), .y(y), .sector(sector));

  initial begin
    real ph, q;
    int ix, iy, es;
    for (int it = 0; it < 4000; it++) begin
      ix = $urandom_range(240) - 120;
      iy = $urandom_range(240) - 120;
      if (ix * ix + iy * iy < 400) continue;
      ph = $atan2(real'(iy), real'(ix));
      if (ph < 0) ph += 2.0 * PI;
      q = ph / (PI / 4.0);
      es = $rtoi(q);
      if (q - es < 0.03 || q - es > 0.97) continue;   // near a border
      x = 8'(ix); y = 8'(iy);
      #1;
      checks++;
      if (int'(sector) != es % 8) begin
        failures++;
        $display("FAIL (%0d,%0d) sector %0d expected %0d", ix, iy, sector, es);
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
