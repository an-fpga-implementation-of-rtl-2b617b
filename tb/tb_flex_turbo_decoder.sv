// tb_flex_turbo_decoder: end-to-end test of the flexible turbo decoder at its
// default size (N = 212 bits, 3 iterations).
//
// A transmitter model written here (its own RSC shift registers, the
// interleaver rule pi(j) = (33 j + 5) mod 106, the parity demux and the QPSK /
// 8-PSK mappers) encodes random blocks; RSC1 is terminated by its last three
// information bits. Samples get pseudo-Gaussian noise (sum of four uniform
// values) and are fed to the decoder, whose output bits are compared with the
// transmitted ones. Checked per block: every u1 (and u2 in the 8-PSK mode),
// the iteration count (MAX_ITER without early stop, at most MAX_ITER with it),
// and the decode time (3 iterations = 3 * (K + 4) = 330 clocks, within the 446
// clocks of the reference radix-4 + parallel + dual-path decoder).
// Mechanisms counted, each must occur: QPSK blocks, 8-PSK blocks, blocks whose
// channel hard decisions had errors that the decoder corrected, early stops,
// stops at the iteration limit.
module tb_flex_turbo_decoder;
  localparam int N = 212;
  localparam int K = N / 2;
  localparam int MAX_ITER = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        mode_8psk, early_stop_en, in_valid, in_ready;
  logic signed [7:0] in_x, in_y;
  logic        out_valid, out_last, busy;
  logic [3:0]  out_bits, iterations;
  logic [15:0] decode_cycles;

  flex_turbo_decoder dut (
    .clk(clk), .rst_n(rst_n), .mode_8psk(mode_8psk), .early_stop_en(early_stop_en),
    .in_valid(in_valid), .in_ready(in_ready), .in_x(in_x), .in_y(in_y),
    .out_valid(out_valid), .out_bits(out_bits), .out_last(out_last),
    .iterations(iterations), .decode_cycles(decode_cycles), .busy(busy)
  );

  int checks = 0, failures = 0;
  int n_qpsk = 0, n_8psk = 0, n_corrected = 0, n_early = 0, n_full = 0;

  bit u1 [N], u2 [N], cc [N];
  int sx [N], sy [N];

  function automatic int pi_f(int j);
    return (33 * j + 5) % K;
  endfunction

  // Transmitter: information bits -> coded bits cc[] (parity demux).
  task automatic encode();
    bit r1, r2, r3, a, q1, q2, q3;
    bit p1 [N];
    bit p2 [N];
    r1 = 0; r2 = 0; r3 = 0;
    for (int k = 0; k < N; k++) begin
      if (k >= N - 3) u1[k] = r1 ^ r3;      // tail: drive RSC1 to state 0
      a = u1[k] ^ r1 ^ r3;
      p1[k] = a ^ r1 ^ r2 ^ r3;
      r3 = r2; r2 = r1; r1 = a;
    end
    if (r1 | r2 | r3) begin
      failures++;
      $display("TB model error: RSC1 not terminated");
    end
    q1 = 0; q2 = 0; q3 = 0;
    for (int j = 0; j < K; j++) begin
      for (int b = 0; b < 2; b++) begin
        a = u1[2 * pi_f(j) + b] ^ q1 ^ q3;
        p2[2 * j + b] = a ^ q1 ^ q2 ^ q3;
        q3 = q2; q2 = q1; q1 = a;
      end
    end
    for (int k = 0; k < N; k++) cc[k] = (k % 2 == 0) ? p1[k] : p2[k];
  endtask

  function automatic int noise(int sigma4);   // approx. Gaussian, std ~ sigma4/4*1.15
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(2 * sigma4)) - sigma4;
    return s / 2;
  endfunction

  function automatic int clip8(int v);
    return v > 127 ? 127 : (v < -128 ? -128 : v);
  endfunction

  task automatic make_samples(bit psk8, int sig);
    int m;
    real ang;
    for (int k = 0; k < N; k++) begin
      if (!psk8) begin
        sx[k] = clip8((u1[k] ? 40 : -40) + noise(sig));
        sy[k] = clip8((cc[k] ? 40 : -40) + noise(sig));
      end else begin
        case ({u1[k], cc[k]})
          2'b00: m = 0;
          2'b10: m = 1;
          2'b11: m = 2;
          default: m = 3;
        endcase
        m += 4 * int'(u2[k]);
        ang = m * 3.14159265358979 / 4.0;
        sx[k] = clip8(int'($rtoi(70.0 * $cos(ang) + (70.0 * $cos(ang) >= 0 ? 0.5 : -0.5))) + noise(sig));
        sy[k] = clip8(int'($rtoi(70.0 * $sin(ang) + (70.0 * $sin(ang) >= 0 ? 0.5 : -0.5))) + noise(sig));
      end
    end
  endtask

  task automatic run_block(bit psk8, bit es, int sig);
    int raw_err, nout, err1, err2, t0;
    for (int k = 0; k < N; k++) begin
      u1[k] = 1'($urandom_range(1));
      u2[k] = 1'($urandom_range(1));
    end
    encode();
    make_samples(psk8, sig);
    // channel hard-decision errors on u1 (QPSK: sign of x)
    raw_err = 0;
    if (!psk8) for (int k = 0; k < N; k++) if ((sx[k] > 0) != u1[k]) raw_err++;
    mode_8psk = psk8;
    early_stop_en = es;
    // feed the block, with an idle clock now and then
    for (int k = 0; k < N; k++) begin
      in_valid = 1;
      in_x = 8'(sx[k]);
      in_y = 8'(sy[k]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
      if (k % 37 == 36) begin
        in_valid = 0;
        @(posedge clk); #1;
      end
    end
    in_valid = 0;
    // collect the output
    nout = 0; err1 = 0; err2 = 0;
    t0 = 0;
    while (nout < K) begin
      @(posedge clk); #1;
      if (out_valid) begin
        if (out_bits[0] != u1[2 * nout])     err1++;
        if (out_bits[2] != u1[2 * nout + 1]) err1++;
        if (psk8) begin
          if (out_bits[1] != u2[2 * nout])     err2++;
          if (out_bits[3] != u2[2 * nout + 1]) err2++;
        end else if (out_bits[1] || out_bits[3]) err2++;
        if ((nout == K - 1) != out_last) err2++;
        nout++;
      end
    end
    checks++;
    if (err1 != 0) begin
      failures++;
      $display("FAIL block psk8=%0d sig=%0d: %0d u1 errors (raw %0d)", psk8, sig, err1, raw_err);
    end
    checks++;
    if (err2 != 0) begin
      failures++;
      $display("FAIL block psk8=%0d sig=%0d: %0d u2/last errors", psk8, sig, err2);
    end
    checks++;
    if (es ? (iterations < 1 || iterations > MAX_ITER) : (iterations != MAX_ITER)) begin
      failures++;
      $display("FAIL iterations=%0d es=%0d", iterations, es);
    end
    checks++;
    if (decode_cycles != 16'(int'(iterations) * (K + 4)) || decode_cycles > 446) begin
      failures++;
      $display("FAIL decode_cycles=%0d for %0d iterations", decode_cycles, iterations);
    end
    if (psk8) n_8psk++; else n_qpsk++;
    if (raw_err > 0 && err1 == 0) n_corrected++;
    if (iterations < MAX_ITER) n_early++;
    if (iterations == MAX_ITER) n_full++;
    $display("block psk8=%0d es=%0d sig=%0d raw_err=%0d u1_err=%0d u2_err=%0d iter=%0d cycles=%0d",
             psk8, es, sig, raw_err, err1, err2, iterations, decode_cycles);
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    in_valid = 0; in_x = 0; in_y = 0; mode_8psk = 0; early_stop_en = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    run_block(0, 0, 0);     // QPSK, clean, fixed 3 iterations
    run_block(0, 1, 0);     // QPSK, clean, early stop
    run_block(0, 1, 30);    // QPSK, noisy
    run_block(0, 0, 30);
    run_block(0, 1, 36);
    run_block(0, 1, 48);
    run_block(0, 1, 56);
    run_block(0, 0, 56);
    run_block(1, 1, 0);     // 8-PSK, clean
    run_block(1, 0, 8);     // 8-PSK, light noise
    run_block(1, 1, 10);
    checks++; if (n_qpsk == 0)      begin failures++; $display("FAIL no QPSK block"); end
    checks++; if (n_8psk == 0)      begin failures++; $display("FAIL no 8-PSK block"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL no corrected channel errors"); end
    checks++; if (n_early == 0)     begin failures++; $display("FAIL no early stop"); end
    checks++; if (n_full == 0)      begin failures++; $display("FAIL no stop at the iteration limit"); end
    $display("mechanisms: qpsk=%0d 8psk=%0d corrected=%0d early_stop=%0d iter_limit=%0d",
             n_qpsk, n_8psk, n_corrected, n_early, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
