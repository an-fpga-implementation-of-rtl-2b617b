// ucd: uncoded-bit decision (the look-up table after the re-encoder).
//
// In the 8-PSK mode a symbol carries the turbo-coded pair (u1, c) on one of
// four QPSK labels and the uncoded bit u2 chooses between the two antipodal
// 8-PSK points of that label. With the mapping used here, point m (at phase
// m*pi/4) = f(u1,c) + 4*u2 with f(0,0)=0, f(1,0)=1, f(1,1)=2, f(0,1)=3, which
// is the mapping under which the coset transform sends point m to the QPSK
// point (2u1-1, 2c-1). Given the re-encoded label f and the stored phase
// sector s, u2 = 0 when s lies within 90 degrees of point f, i.e. when
// (s - f) mod 8 is 6, 7, 0 or 1. The 8-PSK mapping and this rule are the
// design's own; the block is only named in the source. Combinational.
module ucd (
  input  logic       u1,
  input  logic       c,
  input  logic [2:0] sector,
  output logic       u2
);

  logic [2:0] f, d;

  always_comb begin
    unique case ({u1, c})
      2'b00:   f = 3'd0;
      2'b10:   f = 3'd1;
      2'b11:   f = 3'd2;
      default: f = 3'd3;
    endcase
    d  = sector - f;
    u2 = !(d == 3'd6 || d == 3'd7 || d == 3'd0 || d == 3'd1);
  end

endmodule
