// dct8_cordic: pipelined 1-D 8-point integer DCT built from CORDIC rotators.
//
// Computes Y[k] = s_k * sum_n x[n]*cos((2n+1)*k*pi/16), s_0 = 1,
// s_k = sqrt(2) otherwise, i.e. sqrt(8) times the orthonormal DCT-II (the
// HEVC 8-point core transform divided by 64, before HEVC's own rounding).
// The flow graph has four stages:
//   1  a[i] = x[i] + x[7-i], b[i] = x[i] - x[7-i]
//   even: a[] goes to a 4-point DCT (dct4_cordic) giving Y0, Y2, Y4, Y6
//   odd:
//   2  (d4, d7) = rot(b3, b0, 3pi/16),  (d5, d6) = rot(b2, b1, pi/16)
//   3  e4 = d4+d6, e6 = d4-d6, e7 = d7+d5, e5 = d7-d5
//   4  Y1 = e7+e4, Y7 = e7-e4, Y3 = sqrt2*e5, Y5 = sqrt2*e6
// rot(x, y, t) = (x cos t + y sin t, -x sin t + y cos t). Every rotation is a
// shift-add CORDIC rotator (cordic_rot) and the sqrt2 factors are shift-add
// constants (sqrt2_scale), so the unit has no multiplier. The stages, the
// rotation angles and the use of CORDIC follow the document's flow graph;
// the exact butterfly wiring was checked against the DCT definition, and the
// widths, pipelining and rounding are this design's own choices.
//
// With x[4..7] = 0, a[i] = x[i] and the even outputs Y0, Y2, Y4, Y6 are the
// 4-point DCT of x[0..3], so the same unit also serves HEVC's 4-point size.
//
// Interface: x[] are DW-bit signed integers (9 bits: an 8-bit video
// residual), Y[] are DW+4-bit signed integers rounded to nearest. The odd
// half carries FRAC extra fraction bits until the final rounding.
// Timing: fully pipelined, one 8-sample vector per clock, result and
// out_valid DCT8_LATENCY = 4 clocks after the inputs and in_valid.
// Synchronous, active-low reset clears the valid pipeline only.
module dct8_cordic
  import cordic_dct_pkg::*;
#(
  parameter int DW   = 9,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [DW-1:0]  x [8],
  output logic                  out_valid,
  output logic signed [DW+3:0]  y [8]
);

  localparam int AW = DW + 1;          // stage-1 sums and differences
  localparam int OW = DW + 4;          // outputs
  localparam int NW = DW + FRAC + 5;   // odd half, with fraction bits

  // ---------------- stage 1: input butterflies ----------------
  logic                 v1;
  logic signed [AW-1:0] a [4];
  logic signed [AW-1:0] b [4];

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    for (int i = 0; i < 4; i++) begin
      a[i] <= AW'(x[i]) + AW'(x[7-i]);
      b[i] <= AW'(x[i]) - AW'(x[7-i]);
    end
  end

  // ---------------- even half: 4-point DCT (two stages) ----------------
  logic                 ev_valid;
  logic signed [AW+1:0] ev [4];

  dct4_cordic #(.W(AW), .FRAC(FRAC)) u_even (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (v1),
    .a        (a),
    .out_valid(ev_valid),
    .y        (ev)
  );

  // ---------------- odd half ----------------
  logic signed [NW-1:0] bs [4];
  logic signed [NW-1:0] r4, r7, r5, r6;
  logic signed [NW-1:0] d4, d5, d6, d7;
  logic signed [NW-1:0] e4, e5, e6, e7;
  logic signed [NW-1:0] s3, s5;
  logic                 v2, v3;

  always_comb
    for (int i = 0; i < 4; i++) bs[i] = NW'(b[i]) <<< FRAC;

  cordic_rot #(.W(NW), .ANGLE(ANG_3PI_16), .INVERSE(1'b0)) u_rot3 (
    .x (bs[3]), .y (bs[0]), .xo(r4), .yo(r7)
  );
  cordic_rot #(.W(NW), .ANGLE(ANG_PI_16), .INVERSE(1'b0)) u_rot1 (
    .x (bs[2]), .y (bs[1]), .xo(r5), .yo(r6)
  );

  // stage 2: rotations
  always_ff @(posedge clk) begin
    d4 <= r4; d7 <= r7; d5 <= r5; d6 <= r6;
  end

  // stage 3: butterflies
  always_ff @(posedge clk) begin
    e4 <= d4 + d6;
    e6 <= d4 - d6;
    e7 <= d7 + d5;
    e5 <= d7 - d5;
  end

  sqrt2_scale #(.W(NW)) u_sq3 (.v(e5), .vo(s3));
  sqrt2_scale #(.W(NW)) u_sq5 (.v(e6), .vo(s5));

  function automatic logic signed [OW-1:0] rnd(input logic signed [NW-1:0] v);
    logic signed [NW-1:0] t;
    t = (v + (NW'(1) <<< (FRAC - 1))) >>> FRAC;
    return t[OW-1:0];
  endfunction

  // stage 4: output butterfly and sqrt2 scaling; merge with the even half
  always_ff @(posedge clk) begin
    y[0] <= OW'(ev[0]);
    y[4] <= OW'(ev[2]);
    y[2] <= OW'(ev[1]);
    y[6] <= OW'(ev[3]);
    y[1] <= rnd(e7 + e4);
    y[7] <= rnd(e7 - e4);
    y[3] <= rnd(s3);
    y[5] <= rnd(s5);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) {v2, v3, out_valid} <= '0;
    else        {v2, v3, out_valid} <= {v1, v2, ev_valid};
  end

  // The even half (dct4) and the odd half are equally deep.
  assert property (@(posedge clk) disable iff (!rst_n) ev_valid == v3)
    else $error("dct8_cordic: even and odd halves out of step");

endmodule
