// tb_dct8_cordic: self-checking test of the 1-D 8-point CORDIC DCT.
//
// Streams corner vectors (all-max, all-min, alternating, single impulses)
// and random 9-bit vectors through the unit, with random idle cycles in
// between, and compares every output with the floating-point DCT-II from
// tb_dct_ref_pkg. Allowed error: 2 LSB plus 0.25% of the input's L1 norm,
// which covers the rotators' angle and gain approximations. Also checks that
// each result appears exactly DCT8_LATENCY clocks after its input, and that
// with x[4..7] = 0 the even outputs Y0, Y2, Y4, Y6 are the 4-point DCT of
// x[0..3] (the unit used for HEVC's 4-point size).
module tb_dct8_cordic;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int DW = 9;
  localparam int NVEC = 3000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DW-1:0] x [8];
  logic signed [DW+3:0] y [8];
  int checks = 0, failures = 0;
  int cycle = 0, n_four = 0;
  real max_err = 0.0;

  dct8_cordic #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results, tagged with the cycle they were issued in
  typedef struct { real y [8]; real y4 [4]; bit four; real tol; int t_in; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int v [8]);
    exp_t e;
    real xr [8];
    real l1 = 0.0;
    for (int i = 0; i < 8; i++) begin
      x[i] = DW'(v[i]);
      xr[i] = v[i];
      l1 += fabs(xr[i]);
    end
    for (int k = 0; k < 8; k++) e.y[k] = dct_ref(8, xr, k);
    e.four = (v[4] == 0 && v[5] == 0 && v[6] == 0 && v[7] == 0);
    for (int k = 0; k < 4; k++) e.y4[k] = dct_ref(4, xr, k);
    e.tol = 2.0 + 0.0025 * l1;
    e.t_in = cycle;
    q.push_back(e);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (cycle - e.t_in != DCT8_LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t_in, DCT8_LATENCY);
        end
        for (int k = 0; k < 8; k++) begin
          checks++;
          err = fabs(real'(y[k]) - e.y[k]);
          if (err > max_err) max_err = err;
          if (err > e.tol) begin
            failures++;
            if (failures < 10)
              $display("Y[%0d] = %0d, expected %f (tol %f)", k, y[k], e.y[k], e.tol);
          end
        end
        // upper half zero: the even outputs are the 4-point DCT of x[0..3]
        if (e.four) begin
          n_four++;
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (fabs(real'(y[2*k]) - e.y4[k]) > e.tol) begin
              failures++;
              $display("4-point use: Y[%0d] = %0d, expected %f", 2*k, y[2*k], e.y4[k]);
            end
          end
        end
      end
    end
  end

  initial begin
    int v [8];
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // corners
    for (int i = 0; i < 8; i++) v[i] = 255;              drive(v);
    for (int i = 0; i < 8; i++) v[i] = -256;             drive(v);
    for (int i = 0; i < 8; i++) v[i] = (i % 2 != 0) ? -256 : 255; drive(v);
    for (int i = 0; i < 8; i++) v[i] = (i < 4) ? 255 : -256;  drive(v);
    for (int j = 0; j < 8; j++) begin
      for (int i = 0; i < 8; i++) v[i] = (i == j) ? 255 : 0;
      drive(v);
    end
    // random, with random gaps
    for (int n = 0; n < NVEC; n++) begin
      for (int i = 0; i < 8; i++) v[i] = int'($urandom_range(511)) - 256;
      drive(v);
      if ($urandom_range(3) == 0) begin
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
      end
    end
    // 4-point use of the 8-point unit
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 8; i++) v[i] = (i < 4) ? int'($urandom_range(511)) - 256 : 0;
      drive(v);
    end
    repeat (DCT8_LATENCY + 2) @(posedge clk);
    checks++;
    if (n_four == 0) begin
      failures++;
      $display("4-point use never exercised");
    end
    $display("vectors checked as 4-point DCTs: %0d", n_four);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results never appeared", q.size());
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
