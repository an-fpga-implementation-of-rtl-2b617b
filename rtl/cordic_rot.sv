// cordic_rot: cosine and sine of a binary angle by CORDIC rotation.
//
// Produces (AMP*cos(theta), AMP*sin(theta)) rounded to W-bit signed
// integers, for a 16-bit binary angle theta (65536 = 2*pi). Angles in the
// left half are handled by rotating by pi and negating the result; 14
// unrolled shift-add micro-rotations follow, starting from a vector whose
// length pre-compensates the CORDIC gain (1.64676). Purely combinational.
// Helper of the coset symbol transformer; the method is this design's choice.
module cordic_rot #(
  parameter int W   = 8,
  parameter int AMP = 45     // output amplitude in LSB (informative, see X0)
) (
  input  logic        [15:0]  theta,
  output logic signed [W-1:0] c,
  output logic signed [W-1:0] s
);

  localparam int NIT = 14;
  localparam int IW  = W + 10;
  // Start length with 6 fraction bits: AMP * 64 / 1.64676.
  localparam int X0  = (AMP * 64 * 10000 + 8233) / 16468;

  function automatic logic [15:0] atan_tab(input int i);
    case (i)
      0: return 16'd8192;  1: return 16'd4836;  2: return 16'd2555;  3: return 16'd1297;
      4: return 16'd651;   5: return 16'd326;   6: return 16'd163;   7: return 16'd81;
      8: return 16'd41;    9: return 16'd20;    10: return 16'd10;   11: return 16'd5;
      12: return 16'd3;    default: return 16'd1;
    endcase
  endfunction

  function automatic logic signed [W-1:0] round_sat(input logic signed [IW-1:0] v);
    logic signed [IW-1:0] r;
    r = (v + IW'(32)) >>> 6;
    if (r > IW'((1 << (W-1)) - 1)) return W'((1 << (W-1)) - 1);
    if (r < -IW'(1 << (W-1)))      return W'(-(1 << (W-1)));
    return r[W-1:0];
  endfunction

  always_comb begin
    logic signed [IW-1:0] xr, yr, xn, yn;
    logic signed [15:0] z;
    logic flip;
    flip = theta[15] ^ theta[14];          // theta in [pi/2, 3pi/2)
    z  = signed'(flip ? theta + 16'd32768 : theta);
    xr = IW'(X0);
    yr = '0;
    for (int i = 0; i < NIT; i++) begin
      if (z >= 0) begin
        xn = xr - (yr >>> i);
        yn = yr + (xr >>> i);
        z  = z - signed'(atan_tab(i));
      end else begin
        xn = xr + (yr >>> i);
        yn = yr - (xr >>> i);
        z  = z + signed'(atan_tab(i));
      end
      xr = xn;
      yr = yn;
    end
    if (flip) begin
      xr = -xr;
      yr = -yr;
    end
    c = round_sat(xr);
    s = round_sat(yr);
  end

endmodule
