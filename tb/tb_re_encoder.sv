// tb_re_encoder: the re-encoded bits of a random block against the
// shift-register model: c[0] of pair n is the RSC1 parity of bit 2n, c[1]
// the RSC2 parity of the second bit of the pair fed in interleaved position;
// start must clear both encoders (two blocks are run back to back).
module tb_re_encoder;
  import tb_rsc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  always #5 clk = ~clk;
  logic [1:0] u_nat, u_int, c;
  int checks = 0, failures = 0;

  re_encoder dut (.*);

  initial begin
    rsc_t r1, r2;
    bit e0, e1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 2; blk++) begin
      start = 1; @(negedge clk); start = 0;
      r1 = from_int(0); r2 = from_int(0);
      for (int n = 0; n < 106; n++) begin
        u_nat = 2'($urandom); u_int = 2'($urandom);
        en = (n % 5 != 4);
        #1;
        if (en) begin
          e0 = step(r1, u_nat[0]);
          void'(step(r1, u_nat[1]));
          void'(step(r2, u_int[0]));
          e1 = step(r2, u_int[1]);
          checks += 2;
          if (c[0] != e0) begin failures++; $display("FAIL c0 pair %0d", n); end
          if (c[1] != e1) begin failures++; $display("FAIL c1 pair %0d", n); end
        end
        @(negedge clk);
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
