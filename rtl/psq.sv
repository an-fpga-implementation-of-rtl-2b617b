// psq: phase sector quantizer for the 8-PSK mode.
//
// Reports in which of the eight 45-degree sectors the received sample lies:
// sector s covers phases [s*pi/4, (s+1)*pi/4), so the 8-PSK points (at
// m*pi/4, the points the coset transform folds onto QPSK) sit on sector
// borders and every sector touches two neighbouring points. The 3-bit
// result is buffered for the block and later, with the re-encoded QPSK label,
// decides the uncoded bit. The design fixes only the 3-bit width; the sector
// layout and the CORDIC phase detector are this design's choices.
// Combinational, no clock.
module psq #(
  parameter int W = 8
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic        [2:0]   sector
);

  logic [15:0] phi;

  cordic_vec #(.W(W)) u_vec (.x(x), .y(y), .phase(phi));

  assign sector = phi[15:13];

endmodule
