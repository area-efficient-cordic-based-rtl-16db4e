// cordic_dct_pkg: constants shared by the CORDIC DCT modules.
//
// Every rotation in the 8-point DCT flow graph is done by a fixed-angle
// CORDIC rotator: a short chain of micro-rotations by +/-atan(2^-s),
// followed by a shift-add gain correction. The tables below hold, for each
// of the three angles the flow graph needs (3pi/8 with gain sqrt2, pi/16 and
// 3pi/16 with gain 1), the shift s and direction of every micro-rotation and
// the signed power-of-two terms of the gain correction.
//
// How the numbers were chosen (this design's own choice):
//   angle:  sum_i sigma_i * atan(2^-s_i) ~= theta, fewest micro-rotations with
//           an angle error below 0.12 degree
//   gain:   K = prod_i sqrt(1 + 2^-2*s_i); correction C = G / K, written as
//           sum_j c_j * 2^e_j with a relative error below about 2^-10
//     3pi/8  : s = 0,1,4,7  sigma = +,+,-,-  err 0.041 deg  K = 1.58427
//              C = sqrt2/K = 0.892658 ~ 1 - 2^-3 + 2^-6 + 2^-9
//     pi/16  : s = 0,1,3    sigma = +,-,-    err 0.060 deg  K = 1.59344
//              C = 1/K = 0.627572 ~ 2^-1 + 2^-3 + 2^-9
//     3pi/16 : s = 1,3      sigma = +,+      err 0.060 deg  K = 1.12674
//              C = 1/K = 0.887520 ~ 1 - 2^-3 + 2^-6 - 2^-8
//   sqrt2 (plain constant multiplier, no rotation):
//              1.414214 ~ 2^1 - 2^-1 - 2^-4 - 2^-5 + 2^-7
package cordic_dct_pkg;

  // The three rotation angles of the flow graph.
  typedef enum logic [1:0] {
    ANG_3PI_8  = 2'd0,   // even part, output pair (2,6), gain sqrt2
    ANG_PI_16  = 2'd1,   // odd part, inputs (x2-x5, x1-x6)
    ANG_3PI_16 = 2'd2    // odd part, inputs (x3-x4, x0-x7)
  } angle_e;

  localparam int MAX_MICRO = 4;  // longest micro-rotation chain
  localparam int MAX_COMP  = 5;  // most terms in a gain correction

  // Micro-rotations per angle, indexed [angle][i].
  localparam int ROT_N  [3]            = '{4, 3, 2};
  localparam int ROT_SH [3][MAX_MICRO] = '{'{0, 1, 4, 7}, '{0, 1, 3, 0}, '{1, 3, 0, 0}};
  localparam int ROT_SG [3][MAX_MICRO] = '{'{1, 1, -1, -1}, '{1, -1, -1, 0}, '{1, 1, 0, 0}};

  // Gain correction per angle: value = sum_j COMP_SG[j] * 2^-COMP_SH[j].
  localparam int COMP_N  [3]           = '{4, 3, 4};
  localparam int COMP_SH [3][MAX_COMP] = '{'{0, 3, 6, 9, 0}, '{1, 3, 9, 0, 0}, '{0, 3, 6, 8, 0}};
  localparam int COMP_SG [3][MAX_COMP] = '{'{1, -1, 1, 1, 0}, '{1, 1, 1, 0, 0}, '{1, -1, 1, -1, 0}};

  // sqrt2 multiplier: 2*v - sum_j SQ2_SG[j] * (v >>> SQ2_SH[j]) terms below.
  localparam int SQ2_N      = 4;
  localparam int SQ2_SH [4] = '{1, 4, 5, 7};
  localparam int SQ2_SG [4] = '{-1, -1, -1, 1};

  // Pipeline depth of the 1-D units (clock cycles from input to output).
  localparam int DCT8_LATENCY  = 4;
  localparam int DCT4_LATENCY  = 2;
  localparam int IDCT8_LATENCY = 4;
  // transpose buffer: clocks from the last row written to the first column out
  localparam int TRANSPOSE_LATENCY = 2;
  // 2-D units: clocks from the last input vector of a block to the first
  // output vector of that block
  localparam int DCT2D_LATENCY  = DCT8_LATENCY + TRANSPOSE_LATENCY + DCT8_LATENCY;
  localparam int IDCT2D_LATENCY = IDCT8_LATENCY + TRANSPOSE_LATENCY + IDCT8_LATENCY;

endpackage
