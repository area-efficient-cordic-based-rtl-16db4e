// dct4_cordic: pipelined 4-point DCT with one CORDIC rotation.
//
// For inputs a[0..3] it computes y[k] = s_k * sum_n a[n]*cos((2n+1)*k*pi/8),
// s_0 = 1, s_k = sqrt(2) otherwise (the orthonormal 4-point DCT-II times 2).
// This is the even half of the 8-point flow graph: one butterfly stage
//   c0 = a0+a3, c1 = a1+a2, c2 = a1-a2, c3 = a0-a3
// then y0 = c0+c1, y2 = c0-c1 and (y1, y3) = sqrt2 * rotation of (c2, c3) by
// 3pi/8, done by a shift-add CORDIC rotator (cordic_rot). The structure
// follows the document's flow graph; the pipelining, widths and rounding are
// this design's own choices.
//
// Interface: a[] are W-bit signed integers, y[] are W+2-bit signed integers,
// rounded to nearest. Internally FRAC fraction bits are carried to keep the
// rotator's truncation errors below one output LSB.
// Timing: one 4-sample vector per clock; y[] and out_valid appear
// DCT4_LATENCY = 2 clocks after the inputs and in_valid. Synchronous,
// active-low reset clears the valid pipeline only.
module dct4_cordic
  import cordic_dct_pkg::*;
#(
  parameter int W    = 10,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   a [4],
  output logic                  out_valid,
  output logic signed [W+1:0]   y [4]
);

  localparam int CW = W + FRAC + 2;  // butterfly outputs plus rotator headroom

  logic                 v1;
  logic signed [CW-1:0] c0, c1, c2, c3;
  logic signed [CW-1:0] r2, r6;

  // Stage 1: butterflies on the inputs, scaled up by 2^FRAC.
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    c0 <= (CW'(a[0]) + CW'(a[3])) <<< FRAC;
    c1 <= (CW'(a[1]) + CW'(a[2])) <<< FRAC;
    c2 <= (CW'(a[1]) - CW'(a[2])) <<< FRAC;
    c3 <= (CW'(a[0]) - CW'(a[3])) <<< FRAC;
  end

  cordic_rot #(.W(CW), .ANGLE(ANG_3PI_8), .INVERSE(1'b0)) u_rot (
    .x (c2), .y (c3), .xo(r2), .yo(r6)
  );

  function automatic logic signed [W+1:0] rnd(input logic signed [CW-1:0] v);
    logic signed [CW-1:0] t;
    t = (v + (CW'(1) <<< (FRAC - 1))) >>> FRAC;
    return t[W+1:0];
  endfunction

  // Stage 2: output butterfly and the rounded rotator outputs.
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v1;
    y[0] <= rnd(c0 + c1);
    y[2] <= rnd(c0 - c1);
    y[1] <= rnd(r2);
    y[3] <= rnd(r6);
  end

endmodule
