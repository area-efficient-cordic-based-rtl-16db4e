// dct2d_8x8: row-column 2-D 8x8 forward DCT.
//
// A 2-D DCT is a 1-D DCT along the rows followed by a 1-D DCT along the
// columns (the row-column algorithm, as the document describes). Rows of an
// 8x8 residual block enter one per clock and go through a first dct8_cordic;
// the row results are transposed in a ping-pong transpose_buffer and its
// columns go through a second dct8_cordic. The result is
//   Z = F * X * F^T,  F = sqrt(8) * C8 (C8 the orthonormal DCT-II)
// i.e. 8 times the orthonormal 2-D DCT. Word growth is kept in full (no
// intermediate right shifts, unlike the HEVC reference scaling): that
// choice, the widths and the output order are this design's own.
//
// Interface: in_row[n] = X[r][n] for rows r = 0..7 of a block on consecutive
// valid clocks (gaps allowed between rows), DW-bit signed. out_col[k1] =
// Z[k1][k2] for horizontal frequency k2 = 0..7 on 8 consecutive clocks,
// DW+8-bit signed, so the block comes out column by column.
// Timing: the first column appears DCT2D_LATENCY = 10 clocks after the last
// row of the block; one row in and one column out per clock sustained.
module dct2d_8x8
  import cordic_dct_pkg::*;
#(
  parameter int DW   = 9,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  in_row [8],
  output logic                  out_valid,
  output logic signed [DW+7:0]  out_col [8]
);

  localparam int RW = DW + 4;   // row-pass coefficients

  logic                 row_valid, tr_valid;
  logic signed [RW-1:0] row_coef [8];
  logic signed [RW-1:0] tr_col [8];

  dct8_cordic #(.DW(DW), .FRAC(FRAC)) u_row (
    .clk, .rst_n, .in_valid, .x(in_row), .out_valid(row_valid), .y(row_coef)
  );

  transpose_buffer #(.W(RW), .N(8)) u_tr (
    .clk, .rst_n, .in_valid(row_valid), .in_vec(row_coef),
    .out_valid(tr_valid), .out_vec(tr_col)
  );

  dct8_cordic #(.DW(RW), .FRAC(FRAC)) u_col (
    .clk, .rst_n, .in_valid(tr_valid), .x(tr_col), .out_valid, .y(out_col)
  );

endmodule
