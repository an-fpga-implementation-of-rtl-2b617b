// coset_transformer: coset symbol transformer (CST) for the 8-PSK mode.
//
// Folds a received 8-PSK sample onto the QPSK constellation so that an
// unmodified half-rate binary turbo decoder can decode it:
//   x' = sqrt(2) cos(2(phi + 5pi/8)),  y' = sqrt(2) sin(2(phi + 5pi/8)),
// with phi the phase of the received sample (this equation is the design's
// definition of the transform). The two antipodal 8-PSK points that differ
// only in the uncoded bit land on the same QPSK point; the uncoded bit is
// recovered later from the phase sector.
//
// Implementation (this design's choice): a CORDIC vectoring stage finds phi
// as a 16-bit binary angle, the angle is doubled and 5pi/4 (40960) is added
// modulo 2pi, and a CORDIC rotation stage produces the cosine and sine.
// Output scale: a QPSK point (+-1, +-1) becomes (+-UNIT, +-UNIT), so the
// outputs have amplitude sqrt(2)*UNIT. The amplitude of the received sample
// is discarded, as in the equation. Combinational, no clock.
module coset_transformer #(
  parameter int W    = 8,    // r_q, received sample width
  parameter int UNIT = 32    // output value of a unit QPSK coordinate
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] xq,
  output logic signed [W-1:0] yq
);

  logic [15:0] phi, theta;

  cordic_vec #(.W(W)) u_vec (.x(x), .y(y), .phase(phi));

  assign theta = {phi[14:0], 1'b0} + 16'd40960;   // 2*phi + 5pi/4

  cordic_rot #(.W(W), .AMP((UNIT * 14142 + 5000) / 10000)) u_rot (
    .theta(theta), .c(xq), .s(yq)
  );

endmodule
