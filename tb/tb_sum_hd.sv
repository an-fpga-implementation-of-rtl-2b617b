// tb_sum_hd: self-checking test of the SUM + hard-decision slice.
// Drives every corner pair of 9-bit LLRs (-256, -255, -1, 0, 1, 255) and
// random values into both bit lanes and compares each output bit with
// (l_dec1 + l_dec2 > 0), computed here in plain integers. Combinational DUT;
// the clock only paces the stimulus. Ends with a TB_RESULT line.
module tb_sum_hd;
  import turbo_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [2*LQ-1:0] l1, l2;
  logic [1:0]      u;

  sum_hd dut (.l_dec1(l1), .l_dec2(l2), .u(u));

  int checks = 0, failures = 0;
  int corner [6] = '{-256, -255, -1, 0, 1, 255};

  task automatic try(int a0, int a1, int b0, int b1);
    l1 = {LQ'(a1), LQ'(a0)};
    l2 = {LQ'(b1), LQ'(b0)};
    @(posedge clk); #1;
    checks++;
    if (u[0] != (a0 + b0 > 0) || u[1] != (a1 + b1 > 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d+%0d, %0d+%0d -> u=%b", a0, b0, a1, b1, u);
    end
  endtask

  initial begin
    int a, b, c, d;
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        try(corner[i], corner[j], corner[j], corner[i]);
        try(corner[i], corner[5 - j], corner[j], corner[i]);
      end
    for (int n = 0; n < 2000; n++) begin
      a = $urandom_range(511) - 256;
      b = $urandom_range(511) - 256;
      c = (n % 3 == 0) ? -a : $urandom_range(511) - 256;
      d = (n % 5 == 0) ? -b + 1 : $urandom_range(511) - 256;
      if (c < -256 || c > 255) c = 0;
      if (d < -256 || d > 255) d = 0;
      try(a, b, c, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
