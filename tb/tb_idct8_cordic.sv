// tb_idct8_cordic: self-checking test of the 1-D 8-point inverse CORDIC DCT.
//
// Two kinds of input: coefficients of the exact forward DCT of a random
// 9-bit vector (rounded to integers), whose inverse must give the vector
// back, and arbitrary 13-bit coefficients, whose inverse is mostly outside
// the 9-bit output range and must saturate. Each output is compared with the
// floating-point inverse from tb_dct_ref_pkg, saturated to 9 bits, within
// 1.5 LSB plus 0.05% of the coefficients' L1 norm. Checks that every result
// appears IDCT8_LATENCY clocks after its input, and counts how often the
// saturation was exercised.
module tb_idct8_cordic;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int IW = 13;
  localparam int OW = 9;
  localparam int NVEC = 3000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [IW-1:0] y [8];
  logic signed [OW-1:0] x [8];
  int checks = 0, failures = 0, saturated = 0;
  int cycle = 0;

  idct8_cordic #(.IW(IW), .OW(OW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real x [8]; real tol; int t_in; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int c [8]);
    exp_t e;
    real yr [8];
    real l1 = 0.0;
    for (int k = 0; k < 8; k++) begin
      y[k] = IW'(c[k]);
      yr[k] = c[k];
      l1 += fabs(yr[k]);
    end
    for (int n = 0; n < 8; n++) begin
      e.x[n] = idct_ref(yr, n);
      if (e.x[n] > 255.0)  begin e.x[n] = 255.0;  saturated++; end
      if (e.x[n] < -256.0) begin e.x[n] = -256.0; saturated++; end
    end
    e.tol = 1.5 + 0.0005 * l1;
    e.t_in = cycle;
    q.push_back(e);
    in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = q.pop_front();
        if (cycle - e.t_in != IDCT8_LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t_in, IDCT8_LATENCY);
        end
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (fabs(real'(x[n]) - e.x[n]) > e.tol) begin
            failures++;
            if (failures < 10) $display("x[%0d] = %0d, expected %f", n, x[n], e.x[n]);
          end
        end
      end
    end
  end

  initial begin
    int c [8];
    real s [8];
    for (int k = 0; k < 8; k++) y[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < NVEC; n++) begin
      if (n % 4 == 3) begin
        for (int k = 0; k < 8; k++) c[k] = int'($urandom_range(8191)) - 4096;
      end else begin
        for (int i = 0; i < 8; i++) s[i] = real'(int'($urandom_range(511)) - 256);
        for (int k = 0; k < 8; k++) c[k] = int'($rtoi(dct_ref(8, s, k) + 4096.5)) - 4096;
      end
      drive(c);
      if ($urandom_range(3) == 0) begin
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
      end
    end
    repeat (IDCT8_LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results never appeared", q.size());
    end
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("saturated outputs: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
