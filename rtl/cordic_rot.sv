// cordic_rot: fixed-angle CORDIC rotator, shifts and adds only.
//
// Computes, for a signed input pair (x, y) and one of the three angles of the
// DCT flow graph (theta, gain G from cordic_dct_pkg):
//   forward (INVERSE = 0): xo = G*( x*cos(theta) + y*sin(theta))
//                          yo = G*(-x*sin(theta) + y*cos(theta))
//   inverse (INVERSE = 1): the transpose, i.e. the rotation by -theta
//                          xo = G*( x*cos(theta) - y*sin(theta))
//                          yo = G*( x*sin(theta) + y*cos(theta))
// Each micro-rotation i does  x += sg*(y >>> s), y -= sg*(x >>> s)  (signs
// flipped when INVERSE = 1); the chain's gain K is then replaced by G through
// a shift-add correction. Replacing the flow graph's multiplier butterflies
// by CORDIC rotations follows the document; the micro-rotation sequences, the
// correction terms and the word widths are this design's own choice.
//
// Interface: purely combinational, x/y and xo/yo are W-bit two's complement
// integers (the caller appends fraction bits for accuracy). The caller must
// leave one bit of headroom: |xo|,|yo| can reach 2*max(|x|,|y|).
// Arithmetic shifts truncate towards minus infinity; each micro-rotation and
// correction term can lose up to one LSB.
module cordic_rot
  import cordic_dct_pkg::*;
#(
  parameter int     W       = 16,
  parameter angle_e ANGLE   = ANG_PI_16,
  parameter bit     INVERSE = 1'b0
) (
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] y,
  output logic signed [W-1:0] xo,
  output logic signed [W-1:0] yo
);

  localparam int IW = W + 2;  // the micro-rotation chain grows by K < 1.6

  localparam int A = int'(ANGLE);

  logic signed [IW-1:0] xs [MAX_MICRO+1];
  logic signed [IW-1:0] ys [MAX_MICRO+1];
  logic signed [IW-1:0] xc, yc;

  always_comb begin
    xs[0] = IW'(x);
    ys[0] = IW'(y);
    for (int i = 0; i < MAX_MICRO; i++) begin
      if (i < ROT_N[A]) begin
        if ((ROT_SG[A][i] > 0) != INVERSE) begin
          xs[i+1] = xs[i] + (ys[i] >>> ROT_SH[A][i]);
          ys[i+1] = ys[i] - (xs[i] >>> ROT_SH[A][i]);
        end else begin
          xs[i+1] = xs[i] - (ys[i] >>> ROT_SH[A][i]);
          ys[i+1] = ys[i] + (xs[i] >>> ROT_SH[A][i]);
        end
      end else begin
        xs[i+1] = xs[i];
        ys[i+1] = ys[i];
      end
    end
  end

  // Gain correction: sum of signed, right-shifted copies.
  always_comb begin
    xc = '0;
    yc = '0;
    for (int j = 0; j < MAX_COMP; j++) begin
      if (j < COMP_N[A]) begin
        if (COMP_SG[A][j] > 0) begin
          xc = xc + (xs[MAX_MICRO] >>> COMP_SH[A][j]);
          yc = yc + (ys[MAX_MICRO] >>> COMP_SH[A][j]);
        end else begin
          xc = xc - (xs[MAX_MICRO] >>> COMP_SH[A][j]);
          yc = yc - (ys[MAX_MICRO] >>> COMP_SH[A][j]);
        end
      end
    end
  end

  assign xo = W'(xc);
  assign yo = W'(yc);

endmodule
