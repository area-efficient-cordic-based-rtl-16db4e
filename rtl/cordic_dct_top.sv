// cordic_dct_top: the transform pair of an HEVC encoder loop, 8x8 blocks.
//
// An HEVC encoder transforms each prediction residual, quantizes the
// coefficients, and, to rebuild the reference picture, dequantizes them and
// applies the inverse transform. This top holds the two transform stages of
// that loop: the forward 2-D CORDIC DCT (dct2d_8x8) and the inverse 2-D
// CORDIC DCT (idct2d_8x8). Quantization and dequantization sit between them
// outside this design, so both halves have their own ports: a testbench or a
// quantizer closes the loop by feeding fwd_out_col (possibly quantized and
// rescaled) back into inv_in_col.
//
// Forward:  fwd_in_row  rows of 9-bit residuals, one per clock
//           fwd_out_col coefficient columns, 17-bit, 10 clocks after the
//                       last row of a block (8 x the orthonormal 2-D DCT)
// Inverse:  inv_in_col  coefficient columns in the forward output's order
//           and scale; inv_out_row reconstructed rows, 10 clocks after the
//           last column. Both run at one vector per clock.
// Block size 8x8 and the CORDIC flow graph follow the document; word widths,
// scaling and the vector-per-clock interface are this design's choices.
module cordic_dct_top
  import cordic_dct_pkg::*;
#(
  parameter int DW   = 9,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // forward transform
  input  logic                  fwd_in_valid,
  input  logic signed [DW-1:0]  fwd_in_row [8],
  output logic                  fwd_out_valid,
  output logic signed [DW+7:0]  fwd_out_col [8],
  // inverse transform
  input  logic                  inv_in_valid,
  input  logic signed [DW+7:0]  inv_in_col [8],
  output logic                  inv_out_valid,
  output logic signed [DW-1:0]  inv_out_row [8]
);

  dct2d_8x8 #(.DW(DW), .FRAC(FRAC)) u_fwd (
    .clk, .rst_n,
    .in_valid (fwd_in_valid),  .in_row (fwd_in_row),
    .out_valid(fwd_out_valid), .out_col(fwd_out_col)
  );

  idct2d_8x8 #(.DW(DW), .FRAC(FRAC)) u_inv (
    .clk, .rst_n,
    .in_valid (inv_in_valid),  .in_col (inv_in_col),
    .out_valid(inv_out_valid), .out_row(inv_out_row)
  );

endmodule
