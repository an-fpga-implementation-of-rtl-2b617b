// cordic_vec: phase of a received sample by CORDIC vectoring.
//
// Returns the angle of (x, y) as a 16-bit binary angle (65536 = 2*pi,
// 0 = positive I axis, counting counter-clockwise). A vector in the left
// half plane is first turned by pi; 14 unrolled shift-add micro-rotations
// then drive y to zero while the rotation angles are summed. Purely
// combinational; the angle error is below 2 LSB for 8-bit inputs away from
// the origin. Helper of the coset symbol transformer and the phase sector
// quantizer; the CORDIC method is this design's choice.
module cordic_vec #(
  parameter int W = 8
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic        [15:0]  phase
);

  localparam int NIT = 14;
  localparam int IW  = W + 8;   // W integer bits, 6 fraction bits, 2 growth bits

  function automatic logic [15:0] atan_tab(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;  3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;   6: return 16'd163;   7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    default: return 16'd1;
    endcase
  endfunction

  always_comb begin
    logic signed [IW-1:0] xr, yr, xn, yn;
    logic [15:0] z;
    xr = IW'(x) <<< 6;
    yr = IW'(y) <<< 6;
    z  = '0;
    if (x < 0) begin
      xr = -xr;
      yr = -yr;
      z  = 16'd32768;
    end
    for (int i = 0; i < NIT; i++) begin
      if (yr >= 0) begin
        xn = xr + (yr >>> i);
        yn = yr - (xr >>> i);
        z  = z + atan_tab(i);
      end else begin
        xn = xr - (yr >>> i);
        yn = yr + (xr >>> i);
        z  = z - atan_tab(i);
      end
      xr = xn;
      yr = yn;
    end
    phase = z;
  end

endmodule
