// tb_coset_transformer: checks x' = sqrt2 cos(2(phi+5pi/8)), y' = sqrt2
// sin(2(phi+5pi/8)) (scaled by UNIT = 32) against real arithmetic for random
// samples, to within 2 LSB, and checks that the eight 8-PSK points m*pi/4 land
// on the QPSK points (2u1-1, 2c-1)*32 of the mapping f(0,0)=0, f(1,0)=1,
// f(1,1)=2, f(0,1)=3, with m and m+4 on the same point.
module tb_coset_transformer;
  logic signed [7:0] x, y, xq, yq;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  coset_transformer dut (.x(x), .y(y), .xq(xq), .yq(yq));

  initial begin
    real phi, ex, ey;
    int ix, iy;
    for (int it = 0; it < 3000; it++) begin
      ix = $urandom_range(200) - 100;
      iy = $urandom_range(200) - 100;
      if (ix * ix + iy * iy < 400) continue;
      x = 8'(ix); y = 8'(iy);
      #1;
      phi = $atan2(real'(iy), real'(ix));
      ex = 32.0 * $sqrt(2.0) * $cos(2.0 * (phi + 5.0 * PI / 8.0));
      ey = 32.0 * $sqrt(2.0) * $sin(2.0 * (phi + 5.0 * PI / 8.0));
      checks++;
      if ((real'(xq) - ex) > 2.0 || (ex - real'(xq)) > 2.0 ||
          (real'(yq) - ey) > 2.0 || (ey - real'(yq)) > 2.0) begin
        failures++;
        $display("FAIL (%0d,%0d): got (%0d,%0d) expected (%f,%f)", ix, iy, xq, yq, ex, ey);
      end
    end
    for (int m = 0; m < 8; m++) begin
      int sx, sy;
      x = 8'($rtoi(90.0 * $cos(m * PI / 4.0)));
      y = 8'($rtoi(90.0 * $sin(m * PI / 4.0)));
      #1;
      // expected QPSK point of label f = m mod 4
      case (m % 4)
        0: begin sx = -1; sy = -1; end
        1: begin sx =  1; sy = -1; end
        2: begin sx =  1; sy =  1; end
        default: begin sx = -1; sy = 1; end
      endcase
      checks++;
      if (int'(xq) < sx * 32 - 2 || int'(xq) > sx * 32 + 2 || int'(yq) < sy * 32 - 2 || int'(yq) > sy * 32 + 2) begin
        failures++;
        $display("FAIL point %0d -> (%0d,%0d)", m, xq, yq);
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
