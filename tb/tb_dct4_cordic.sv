// tb_dct4_cordic: self-checking test of the 4-point CORDIC DCT.
//
// Streams corner and random 10-bit input vectors, with random idle clocks,
// and compares each output with the floating-point 4-point DCT-II (times 2)
// from tb_dct_ref_pkg, within 2 LSB plus 0.25% of the input's L1 norm.
// Checks that every result appears DCT4_LATENCY clocks after its input.
module tb_dct4_cordic;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int W = 10;
  localparam int NVEC = 3000;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] a [4];
  logic signed [W+1:0] y [4];
  int checks = 0, failures = 0;
  int cycle = 0;

  dct4_cordic #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real y [4]; real tol; int t_in; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int v [4]);
    exp_t e;
    real xr [8];
    real l1 = 0.0;
    for (int i = 0; i < 8; i++) xr[i] = 0.0;
    for (int i = 0; i < 4; i++) begin
      a[i] = W'(v[i]);
      xr[i] = v[i];
      l1 += fabs(xr[i]);
    end
    for (int k = 0; k < 4; k++) e.y[k] = dct_ref(4, xr, k);
    e.tol = 2.0 + 0.0025 * l1;
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
        if (cycle - e.t_in != DCT4_LATENCY) begin
          failures++;
          $display("latency %0d, expected %0d", cycle - e.t_in, DCT4_LATENCY);
        end
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (fabs(real'(y[k]) - e.y[k]) > e.tol) begin
            failures++;
            if (failures < 10) $display("y[%0d] = %0d, expected %f", k, y[k], e.y[k]);
          end
        end
      end
    end
  end

  initial begin
    int v [4];
    for (int i = 0; i < 4; i++) a[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) v[i] = 511;  drive(v);
    for (int i = 0; i < 4; i++) v[i] = -512; drive(v);
    for (int i = 0; i < 4; i++) v[i] = (i % 2 != 0) ? -512 : 511; drive(v);
    for (int n = 0; n < NVEC; n++) begin
      for (int i = 0; i < 4; i++) v[i] = int'($urandom_range(1023)) - 512;
      drive(v);
      if ($urandom_range(3) == 0) begin
        repeat ($urandom_range(3)) @(posedge clk);
        #1;
      end
    end
    repeat (DCT4_LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results never appeared", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
