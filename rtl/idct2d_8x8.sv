// idct2d_8x8: row-column 2-D 8x8 inverse DCT, the inverse of dct2d_8x8.
//
// The inverse of a separable 2-D DCT is the separable product of the 1-D
// inverses (as the document states). Coefficient columns, in the order
// dct2d_8x8 produces them, enter one per clock and go through a first
// idct8_cordic; its outputs are transposed in a transpose_buffer and a second
// idct8_cordic turns them back into rows of samples:
//   X = F^T * Z * F / 64,  F = sqrt(8) * C8.
// Each 1-D pass divides by 8 with rounding and saturates to its output width
// (DW+4 bits after the first pass, DW bits after the second), so coefficients
// altered by a quantizer cannot wrap around. The widths and the saturation
// are this design's own choices.
//
// Interface: in_col[k1] = Z[k1][k2] for k2 = 0..7 on consecutive valid
// clocks, DW+8-bit signed; out_row[n] = X[r][n] for rows r = 0..7 on 8
// consecutive clocks, DW-bit signed.
// Timing: the first row appears IDCT2D_LATENCY = 10 clocks after the last
// column of the block; one vector per clock sustained.
module idct2d_8x8
  import cordic_dct_pkg::*;
#(
  parameter int DW   = 9,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW+7:0]  in_col [8],
  output logic                  out_valid,
  output logic signed [DW-1:0]  out_row [8]
);

  localparam int RW = DW + 4;

  logic                 p1_valid, tr_valid;
  logic signed [RW-1:0] p1 [8];
  logic signed [RW-1:0] tr [8];

  idct8_cordic #(.IW(DW + 8), .OW(RW), .FRAC(FRAC)) u_col (
    .clk, .rst_n, .in_valid, .y(in_col), .out_valid(p1_valid), .x(p1)
  );

  transpose_buffer #(.W(RW), .N(8)) u_tr (
    .clk, .rst_n, .in_valid(p1_valid), .in_vec(p1),
    .out_valid(tr_valid), .out_vec(tr)
  );

  idct8_cordic #(.IW(RW), .OW(DW), .FRAC(FRAC)) u_row (
    .clk, .rst_n, .in_valid(tr_valid), .y(tr), .out_valid, .x(out_row)
  );

endmodule
