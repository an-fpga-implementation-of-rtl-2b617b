// re_encoder: re-encoder of the decoded information bits.
//
// Rebuilds the coded bit c of every 8-PSK symbol from the decoded bits u1, as
// the transmitter made it: two copies of the 8-state RSC code (RSC1 on the
// natural order, RSC2 on the interleaved order) and the parity demux, which
// sends the RSC1 parity of the first bit of pair n with symbol 2n and the
// RSC2 parity of the second bit of interleaved pair n with symbol 2n+1.
// Both encoders start in state 0. The demux pattern is this design's choice.
//
// Timing: start clears both encoder states. Each clock with en high consumes
// pair n in natural order (u_nat) and pair pi(n) (u_int); c[0] and c[1], the
// coded bits of symbols 2n and 2n+1, are combinational outputs for that pair.
module re_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       en,
  input  logic [1:0] u_nat,   // {u2, u1} of pair n
  input  logic [1:0] u_int,   // {u2, u1} of pair pi(n)
  output logic [1:0] c
);

  logic [2:0] s1, s2;

  assign c[0] = rsc_par(s1, u_nat[0]);
  assign c[1] = rsc_par(rsc_next(s2, u_int[0]), u_int[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else if (start) begin
      s1 <= '0;
      s2 <= '0;
    end else if (en) begin
      s1 <= r4_next(s1, u_nat);
      s2 <= r4_next(s2, u_int);
    end
  end

endmodule
