// tb_workload_hda: the HDA early-stop workload. Two-thirds-rate 8-PSK blocks
// of N = 212 bits over an AWGN channel at Eb/N0 = 4, 5 and 6 dB, decoded in
// the parallel mode with early stop and an iteration limit of 8. The
// testbench reports the average number of iterations and the bit error rate
// of the coded (u1) and uncoded (u2) bits per point.
// Checked: every block ends within 8 iterations in 8 * (K + 4) clocks, the
// average number of iterations does not grow with Eb/N0, it stays below 8,
// and the coded-bit error rate at 6 dB is below 1e-2.
// Noise: Box-Muller Gaussian samples from $urandom, per-dimension variance
// R^2 / (2 * 2 * Eb/N0) for amplitude R = 70 (two information bits per symbol).
module tb_workload_hda;
  localparam int N = 212;
  localparam int K = N / 2;
  localparam int MAXIT = 8;
  localparam int BLOCKS = 30;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, out_valid, out_last, busy;
  logic signed [7:0] in_x, in_y;
  logic [3:0]  out_bits, iterations;
  logic [15:0] decode_cycles;

  flex_turbo_decoder #(.N(N), .MAX_ITER(MAXIT)) dut (
    .clk(clk), .rst_n(rst_n), .mode_8psk(1'b1), .early_stop_en(1'b1),
    .in_valid(in_valid), .in_ready(in_ready), .in_x(in_x), .in_y(in_y),
    .out_valid(out_valid), .out_bits(out_bits), .out_last(out_last),
    .iterations(iterations), .decode_cycles(decode_cycles), .busy(busy)
  );

  int checks = 0, failures = 0;
  bit u1 [N], u2 [N], cc [N];

  function automatic int pi_f(int j);
    return (33 * j + 5) % K;
  endfunction

  function automatic real gauss();
    real a, b;
    a = (real'($urandom_range(1000000)) + 1.0) / 1000002.0;
    b = real'($urandom_range(1000000)) / 1000001.0;
    return $sqrt(-2.0 * $ln(a)) * $cos(2.0 * PI * b);
  endfunction

  function automatic int clip8(real v);
    int i;
    i = $rtoi(v >= 0 ? v + 0.5 : v - 0.5);
    return i > 127 ? 127 : (i < -128 ? -128 : i);
  endfunction

  task automatic encode();
    bit r1, r2, r3, a;
    bit p1 [N];
    bit p2 [N];
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      if (k >= N - 3) u1[k] = r1 ^ r3;
      a = u1[k] ^ r1 ^ r3;
      p1[k] = a ^ r1 ^ r2 ^ r3;
      r3 = r2; r2 = r1; r1 = a;
    end
    r1 = 0; r2 = 0; r3 = 0;
    for (int j = 0; j < K; j++)
      for (int b = 0; b < 2; b++) begin
        a = u1[2 * pi_f(j) + b] ^ r1 ^ r3;
        p2[2 * j + b] = a ^ r1 ^ r2 ^ r3;
        r3 = r2; r2 = r1; r1 = a;
      end
    for (int k = 0; k < N; k++) cc[k] = (k % 2 == 0) ? p1[k] : p2[k];
  endtask

  real avg_it [3];
  int  e1 [3], e2 [3];

  initial begin
    real sigma, ang, ebn0;
    int m, nout;
    in_valid = 0; in_x = 0; in_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 3; p++) begin
      ebn0 = 10.0 ** ((4.0 + p) / 10.0);
      sigma = 70.0 / $sqrt(4.0 * ebn0);
      avg_it[p] = 0; e1[p] = 0; e2[p] = 0;
      for (int blk = 0; blk < BLOCKS; blk++) begin
        for (int k = 0; k < N; k++) begin u1[k] = 1'($urandom); u2[k] = 1'($urandom); end
        encode();
        for (int k = 0; k < N; k++) begin
          case ({u1[k], cc[k]})
            2'b00: m = 0;
            2'b10: m = 1;
            2'b11: m = 2;
            default: m = 3;
          endcase
          m += 4 * int'(u2[k]);
          ang = m * PI / 4.0;
          @(negedge clk);
          in_valid = 1;
          in_x = 8'(clip8(70.0 * $cos(ang) + sigma * gauss()));
          in_y = 8'(clip8(70.0 * $sin(ang) + sigma * gauss()));
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        @(negedge clk);
        in_valid = 0;
        nout = 0;
        while (nout < K) begin
          @(posedge clk); #1;
          if (out_valid) begin
            e1[p] += int'(out_bits[0] != u1[2 * nout]) + int'(out_bits[2] != u1[2 * nout + 1]);
            e2[p] += int'(out_bits[1] != u2[2 * nout]) + int'(out_bits[3] != u2[2 * nout + 1]);
            nout++;
          end
        end
        avg_it[p] += real'(iterations) / BLOCKS;
        checks++;
        if (iterations < 1 || iterations > MAXIT || decode_cycles != 16'(int'(iterations) * (K + 4))) begin
          failures++;
          $display("FAIL block: iterations=%0d cycles=%0d", iterations, decode_cycles);
        end
        repeat (2) @(posedge clk);
      end
      $display("Eb/N0=%0d dB: average iterations %f, u1 BER %e, u2 BER %e", 4 + p, avg_it[p],
               real'(e1[p]) / (N * BLOCKS), real'(e2[p]) / (N * BLOCKS));
    end
    checks += 4;
    if (avg_it[1] > avg_it[0] + 0.01 || avg_it[2] > avg_it[1] + 0.01) begin failures++; $display("FAIL iterations grow with Eb/N0"); end
    if (avg_it[0] >= MAXIT) begin failures++; $display("FAIL no early stop at 4 dB"); end
    if (avg_it[2] >= MAXIT) begin failures++; $display("FAIL no early stop at 6 dB"); end
    if (real'(e1[2]) / (N * BLOCKS) > 1e-2) begin failures++; $display("FAIL u1 BER at 6 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * BLOCKS * (N + 8 * (K + 4) + K + 40)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
