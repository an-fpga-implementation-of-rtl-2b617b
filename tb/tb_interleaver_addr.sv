// tb_interleaver_addr: forward and backward addresses must follow
// pi(t) = (33 t + 5) mod 106 and pi(105 - t) for t = 0..105, both must be
// permutations, and start must restart the sequence; steps are taken with
// gaps to check that the counters hold when step is low.
module tb_interleaver_addr;
  localparam int K = 106;
  logic clk = 0, rst_n = 0, start = 0, step = 0;
  always #5 clk = ~clk;
  logic [6:0] fwd_addr, bwd_addr;
  int checks = 0, failures = 0;

  interleaver_addr dut (.*);

  initial begin
    bit seen_f [K], seen_b [K];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int i = 0; i < K; i++) begin seen_f[i] = 0; seen_b[i] = 0; end
      for (int t = 0; t < K; t++) begin
        checks += 2;
        if (int'(fwd_addr) != (33 * t + 5) % K) begin failures++; $display("FAIL fwd t=%0d %0d", t, fwd_addr); end
        if (int'(bwd_addr) != (33 * (K - 1 - t) + 5) % K) begin failures++; $display("FAIL bwd t=%0d %0d", t, bwd_addr); end
        if (fwd_addr < K) seen_f[fwd_addr] = 1;
        if (bwd_addr < K) seen_b[bwd_addr] = 1;
        if (t % 7 == 3) @(negedge clk);   // idle clock, step low
        step = 1;
        @(negedge clk);
        step = 0;
      end
      for (int i = 0; i < K; i++) begin
        checks++;
        if (!seen_f[i] || !seen_b[i]) begin failures++; $display("FAIL address %0d missing", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
