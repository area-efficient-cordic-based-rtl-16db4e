// tb_cordic_rot: self-checking test of the fixed-angle CORDIC rotator.
//
// Checks the constant tables first: the micro-rotation angles of each entry
// must add up to its target angle (within 0.12 degree) and the correction
// times the chain gain must equal the target gain (within 0.2%). Then drives
// random and corner input pairs into six rotators (three angles, forward and
// inverse) and compares each output with the exact floating-point rotation,
// allowing 0.3% of the input magnitude plus 8 LSB of truncation.
module tb_cordic_rot;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int W = 20;
  localparam int NVEC = 4000;

  int checks = 0, failures = 0;
  logic signed [W-1:0] x, y;
  logic signed [W-1:0] xo [6];
  logic signed [W-1:0] yo [6];

  localparam real THETA [3] = '{3.0 * PI / 8.0, PI / 16.0, 3.0 * PI / 16.0};
  localparam real GAIN  [3] = '{1.41421356237309505, 1.0, 1.0};

  cordic_rot #(.W(W), .ANGLE(ANG_3PI_8),  .INVERSE(1'b0)) u0 (.x, .y, .xo(xo[0]), .yo(yo[0]));
  cordic_rot #(.W(W), .ANGLE(ANG_PI_16),  .INVERSE(1'b0)) u1 (.x, .y, .xo(xo[1]), .yo(yo[1]));
  cordic_rot #(.W(W), .ANGLE(ANG_3PI_16), .INVERSE(1'b0)) u2 (.x, .y, .xo(xo[2]), .yo(yo[2]));
  cordic_rot #(.W(W), .ANGLE(ANG_3PI_8),  .INVERSE(1'b1)) u3 (.x, .y, .xo(xo[3]), .yo(yo[3]));
  cordic_rot #(.W(W), .ANGLE(ANG_PI_16),  .INVERSE(1'b1)) u4 (.x, .y, .xo(xo[4]), .yo(yo[4]));
  cordic_rot #(.W(W), .ANGLE(ANG_3PI_16), .INVERSE(1'b1)) u5 (.x, .y, .xo(xo[5]), .yo(yo[5]));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input int xi, input int yi);
    real ex, ey, tol, t, g;
    x = W'(xi);
    y = W'(yi);
    #1;
    for (int u = 0; u < 6; u++) begin
      t = (u < 3) ? THETA[u] : -THETA[u-3];
      g = GAIN[u % 3];
      ex = g * ( xi * $cos(t) + yi * $sin(t));
      ey = g * (-xi * $sin(t) + yi * $cos(t));
      tol = 8.0 + 0.003 * (fabs(xi) + fabs(yi));
      checks += 2;
      if (fabs(real'(xo[u]) - ex) > tol || fabs(real'(yo[u]) - ey) > tol) begin
        failures++;
        if (failures < 10)
          $display("rot %0d (%0d,%0d): got (%0d,%0d) expected (%f,%f)",
                   u, xi, yi, xo[u], yo[u], ex, ey);
      end
    end
  endtask

  initial begin
    // table consistency
    for (int a = 0; a < 3; a++) begin
      real ang, k, c;
      ang = 0.0;
      k = 1.0;
      c = 0.0;
      for (int i = 0; i < ROT_N[a]; i++) begin
        ang += ROT_SG[a][i] * $atan(2.0 ** (-ROT_SH[a][i]));
        k   *= $sqrt(1.0 + 2.0 ** (-2 * ROT_SH[a][i]));
      end
      for (int j = 0; j < COMP_N[a]; j++) c += COMP_SG[a][j] * 2.0 ** (-COMP_SH[a][j]);
      checks += 2;
      if (fabs(ang - THETA[a]) * 180.0 / PI > 0.12) begin
        failures++;
        $display("angle table %0d: %f rad, expected %f", a, ang, THETA[a]);
      end
      if (fabs(k * c / GAIN[a] - 1.0) > 0.002) begin
        failures++;
        $display("gain table %0d: %f, expected %f", a, k * c, GAIN[a]);
      end
    end
    // corners and random pairs
    check_pair(0, 0);
    check_pair(100000, 0);
    check_pair(0, 100000);
    check_pair(-100000, 100000);
    check_pair(-131072, -131072);
    for (int n = 0; n < NVEC; n++)
      check_pair(int'($urandom_range(200000)) - 100000, int'($urandom_range(200000)) - 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
