// tb_rx_demux: self-checking test of the input selector and parity demux.
// Feeds three blocks of K = 106 pairs (QPSK, 8-PSK, QPSK) with random
// samples, random CST outputs and sectors, and random idle clocks between
// samples. A model here keeps the previous even sample and, on every odd
// sample, checks pair_we, pair_n, last_pair and the outputs: sys_pair
// {x0, x1}, par1 = y0, par2 = y1, phase {sector1, sector0}, where x / y
// are the raw samples in the QPSK mode and the CST outputs in the 8-PSK mode.
// Also checks that first is high exactly on the first sample of a block and
// that no write happens on even samples or idle clocks.
module tb_rx_demux;
  import turbo_pkg::*;
  localparam int K = 106;
  localparam int AW = $clog2(K);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          mode, accept, first, pair_we, last_pair;
  rq_t           in_x, in_y, cst_x, cst_y;
  logic [2:0]    sector;
  logic [AW-1:0] pair_n;
  logic [15:0]   sys_pair;
  rq_t           par1, par2;
  logic [5:0]    phase;

  rx_demux #(.K(K)) dut (
    .clk(clk), .rst_n(rst_n), .mode_8psk(mode), .accept(accept),
    .in_x(in_x), .in_y(in_y), .cst_x(cst_x), .cst_y(cst_y), .sector(sector),
    .first(first), .pair_we(pair_we), .pair_n(pair_n),
    .sys_pair(sys_pair), .par1(par1), .par2(par2), .phase(phase),
    .last_pair(last_pair)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rq_t x0, y0, xs, ys;
    logic [2:0] s0;
    accept = 0; mode = 0; in_x = 0; in_y = 0; cst_x = 0; cst_y = 0; sector = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      mode = (blk == 1);
      for (int k = 0; k < 2 * K; k++) begin
        // idle clocks now and then: nothing may be written
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          accept = 0;
          in_x = rq_t'($urandom); in_y = rq_t'($urandom);
          #1;
          check(!pair_we && !first && !last_pair, "write on idle clock");
        end
        @(negedge clk);
        accept = 1;
        in_x = rq_t'($urandom); in_y = rq_t'($urandom);
        cst_x = rq_t'($urandom); cst_y = rq_t'($urandom);
        sector = 3'($urandom);
        xs = mode ? cst_x : in_x;
        ys = mode ? cst_y : in_y;
        #1;
        check(first == (k == 0), "first flag");
        if (k % 2 == 0) begin
          check(!pair_we && !last_pair, "write on even sample");
          x0 = xs; y0 = ys; s0 = sector;
        end else begin
          check(pair_we, "pair_we on odd sample");
          check(int'(pair_n) == k / 2, "pair_n");
          check(last_pair == (k / 2 == K - 1), "last_pair");
          check(sys_pair == {x0, xs}, "systematic pair");
          check(par1 == y0, "RSC1 parity");
          check(par2 == ys, "RSC2 parity");
          check(phase == {sector, s0}, "phase");
        end
        @(posedge clk);
      end
      @(negedge clk);
      accept = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
