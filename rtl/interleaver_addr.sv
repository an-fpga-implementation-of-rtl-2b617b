// interleaver_addr: forward and backward address generator of the pair
// interleaver.
//
// The interleaver permutes the K = N/2 information pairs (N = 212 bits,
// K = 106 pairs) so that both component decoders keep the radix-4 pair
// structure. The permutation is pi(t) = (P*t + S) mod K, P coprime to K;
// the rule and the values of P and S are this design's choice, as the
// permutation itself is not given. Two counters run at once: fwd_addr is
// pi(t) for t = 0, 1, ... and bwd_addr is pi(K-1-t), feeding the forward and
// backward halves of a dual-path decoder in the same clock. Each step adds
// or subtracts P modulo K, so no multiplier or divider is needed.
//
// Timing: start loads t = 0 (outputs valid the next clock); step advances t
// by one each clock it is high. start has priority.
module interleaver_addr #(
  parameter int K  = 106,
  parameter int P  = 33,
  parameter int S  = 5,
  localparam int AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  output logic [AW-1:0] fwd_addr,
  output logic [AW-1:0] bwd_addr
);

  localparam int PM    = P % K;
  localparam int LAST  = (PM * (K - 1) + S) % K;   // pi(K-1)

  function automatic logic [AW-1:0] add_mod(input logic [AW-1:0] a, input int d);
    int v;
    v = int'(a) + d;
    if (v >= K) v -= K;
    if (v < 0)  v += K;
    return AW'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_addr <= AW'(S % K);
      bwd_addr <= AW'(LAST);
    end else if (start) begin
      fwd_addr <= AW'(S % K);
      bwd_addr <= AW'(LAST);
    end else if (step) begin
      fwd_addr <= add_mod(fwd_addr, PM);
      bwd_addr <= add_mod(bwd_addr, -PM);
    end
  end

endmodule
