// idct8_cordic: pipelined 1-D 8-point inverse DCT built from CORDIC rotators.
//
// The forward unit (dct8_cordic) computes Y = F*x with F = sqrt(8)*C, C the
// orthonormal DCT-II, so x = F^T*Y / 8 (F^T is the DCT-III). This unit runs
// the forward flow graph backwards with every operation transposed:
// butterflies stay butterflies, each rotation by theta becomes a rotation by
// -theta (the same shift-add rotator with its micro-rotation signs flipped)
// and the sqrt2 factors stay. Stages:
//   1  c0 = Y0+Y4, c1 = Y0-Y4, (c2, c3) = sqrt2*rot(Y2, Y6, -3pi/8)
//      e7 = Y1+Y7, e4 = Y1-Y7, e5 = sqrt2*Y3, e6 = sqrt2*Y5
//   2  a0 = c0+c3, a3 = c0-c3, a1 = c1+c2, a2 = c1-c2
//      d4 = e4+e6, d6 = e4-e6, d7 = e7+e5, d5 = e7-e5
//   3  (b3, b0) = rot(d4, d7, -3pi/16), (b2, b1) = rot(d5, d6, -pi/16)
//   4  x[i] = (a[i]+b[i])/8, x[7-i] = (a[i]-b[i])/8, rounded and saturated
// That the inverse of the DCT-II is the DCT-III with a 2/N factor, and that
// the encoder holds an inverse transform, comes from the document; building
// the inverse as the transposed CORDIC flow graph is this design's choice.
//
// Interface: y[] are IW-bit signed coefficients in the forward unit's scale,
// x[] are OW-bit signed samples, saturated to the OW-bit range.
// Timing: one vector per clock, result and out_valid IDCT8_LATENCY = 4
// clocks after the inputs. Synchronous, active-low reset clears the valid
// pipeline only.
module idct8_cordic
  import cordic_dct_pkg::*;
#(
  parameter int IW   = 13,
  parameter int OW   = 9,
  parameter int FRAC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IW-1:0]  y [8],
  output logic                  out_valid,
  output logic signed [OW-1:0]  x [8]
);

  localparam int NW = IW + FRAC + 5;

  logic signed [NW-1:0] ys [8];
  always_comb
    for (int k = 0; k < 8; k++) ys[k] = NW'(y[k]) <<< FRAC;

  // ---------------- stage 1 ----------------
  logic signed [NW-1:0] rc2, rc3, sq3, sq5;
  logic signed [NW-1:0] c0, c1, c2, c3, e4, e5, e6, e7;

  cordic_rot #(.W(NW), .ANGLE(ANG_3PI_8), .INVERSE(1'b1)) u_rot_e (
    .x (ys[2]), .y (ys[6]), .xo(rc2), .yo(rc3)
  );
  sqrt2_scale #(.W(NW)) u_sq3 (.v(ys[3]), .vo(sq3));
  sqrt2_scale #(.W(NW)) u_sq5 (.v(ys[5]), .vo(sq5));

  always_ff @(posedge clk) begin
    c0 <= ys[0] + ys[4];
    c1 <= ys[0] - ys[4];
    c2 <= rc2;
    c3 <= rc3;
    e7 <= ys[1] + ys[7];
    e4 <= ys[1] - ys[7];
    e5 <= sq3;
    e6 <= sq5;
  end

  // ---------------- stage 2 ----------------
  logic signed [NW-1:0] a [4];
  logic signed [NW-1:0] d4, d5, d6, d7;

  always_ff @(posedge clk) begin
    a[0] <= c0 + c3;
    a[3] <= c0 - c3;
    a[1] <= c1 + c2;
    a[2] <= c1 - c2;
    d4   <= e4 + e6;
    d6   <= e4 - e6;
    d7   <= e7 + e5;
    d5   <= e7 - e5;
  end

  // ---------------- stage 3 ----------------
  logic signed [NW-1:0] rb3, rb0, rb2, rb1;
  logic signed [NW-1:0] a_q [4];
  logic signed [NW-1:0] b [4];

  cordic_rot #(.W(NW), .ANGLE(ANG_3PI_16), .INVERSE(1'b1)) u_rot3 (
    .x (d4), .y (d7), .xo(rb3), .yo(rb0)
  );
  cordic_rot #(.W(NW), .ANGLE(ANG_PI_16), .INVERSE(1'b1)) u_rot1 (
    .x (d5), .y (d6), .xo(rb2), .yo(rb1)
  );

  always_ff @(posedge clk) begin
    a_q  <= a;
    b[0] <= rb0;
    b[1] <= rb1;
    b[2] <= rb2;
    b[3] <= rb3;
  end

  // ---------------- stage 4: butterfly, divide by 8, saturate ----------------
  localparam logic signed [NW-1:0] MAXV = NW'((64'sd1 <<< (OW - 1)) - 1);
  localparam logic signed [NW-1:0] MINV = -NW'(64'sd1 <<< (OW - 1));

  function automatic logic signed [OW-1:0] fin(input logic signed [NW-1:0] v);
    logic signed [NW-1:0] t;
    t = (v + (NW'(1) <<< (FRAC + 2))) >>> (FRAC + 3);
    if (t > MAXV)      return MAXV[OW-1:0];
    else if (t < MINV) return MINV[OW-1:0];
    else               return t[OW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < 4; i++) begin
      x[i]   <= fin(a_q[i] + b[i]);
      x[7-i] <= fin(a_q[i] - b[i]);
    end
  end

  logic v1, v2, v3;
  always_ff @(posedge clk) begin
    if (!rst_n) {v1, v2, v3, out_valid} <= '0;
    else        {v1, v2, v3, out_valid} <= {in_valid, v1, v2, v3};
  end

endmodule
