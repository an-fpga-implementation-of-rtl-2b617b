// rx_demux: input selector (MUX) and parity demux of the decoder.
//
// Selects, per block, the raw QPSK sample or the coset-transformed 8-PSK
// sample, and sorts the symbol stream into trellis pairs for the two
// component decoders. Symbol k carries the systematic value of information
// bit k and one parity value: even symbols (k = 2n) the RSC1 parity of the
// first bit of pair n, odd symbols (k = 2n+1) the RSC2 parity of the second
// bit of interleaved pair n. Every other parity position is punctured and
// written as 0. The source names the selector, the MUX and the demux; the
// puncturing pattern and the RAM word layout are this design's choice.
//
// Outputs, all for pair n, valid in the clock pair_we is high (the clock of
// the odd symbol); the parent packs them into RAM words:
//  * sys_pair: {x'2n, x'2n+1}, the systematic values of both bits;
//  * par1:     y'2n, RSC1 parity of bit 2n (DEC1's word {sys_pair, par1, 0}
//              at address n);
//  * par2:     y'2n+1, RSC2 parity of the second bit of interleaved pair n
//              (DEC2's parity lanes {0, par2} at address pi(n), so DEC2 finds
//              it through the interleaver; its systematic lanes go to n);
//  * phase:    {sector 2n+1, sector 2n}, to the phase buffer at address n.
// last_pair marks pair K-1; the counters then restart for the next block.
// mode_8psk must stay constant during a block.
module rx_demux
  import turbo_pkg::*;
#(
  parameter int K = 106,
  localparam int AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mode_8psk,
  input  logic          accept,      // a sample is taken this clock
  input  rq_t           in_x,
  input  rq_t           in_y,
  input  rq_t           cst_x,
  input  rq_t           cst_y,
  input  logic [2:0]    sector,
  output logic          first,       // this sample is the first of a block
  output logic          pair_we,
  output logic [AW-1:0] pair_n,
  output logic [2*RQ-1:0] sys_pair,
  output rq_t           par1,
  output rq_t           par2,
  output logic [5:0]    phase,
  output logic          last_pair
);

  rq_t        xs, ys, sys0, par0;
  logic [2:0] sec0;
  logic       odd;

  assign xs = mode_8psk ? cst_x : in_x;
  assign ys = mode_8psk ? cst_y : in_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd    <= 1'b0;
      pair_n <= '0;
    end else if (accept) begin
      odd <= !odd;
      if (odd) pair_n <= (int'(pair_n) == K - 1) ? '0 : pair_n + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept && !odd) begin
      sys0 <= xs;
      par0 <= ys;
      sec0 <= sector;
    end
  end

  assign first     = accept && !odd && pair_n == '0;
  assign pair_we   = accept && odd;
  assign last_pair = pair_we && int'(pair_n) == K - 1;
  assign sys_pair  = {sys0, xs};
  assign par1      = par0;
  assign par2      = ys;
  assign phase     = {sector, sec0};

endmodule
