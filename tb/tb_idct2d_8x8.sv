// tb_idct2d_8x8: self-checking test of the row-column 2-D 8x8 inverse DCT.
//
// For random 9-bit residual blocks X it computes Z = F*X*F^T in floating
// point (F = sqrt(8) times the orthonormal DCT-II), rounds Z to integers,
// sends it column by column and checks that X comes back row by row within
// 2 LSB. Two DC-only blocks whose reconstruction (+400 and -400) lies outside
// the 9-bit range check the output saturation. Checks that each block's
// first row comes IDCT2D_LATENCY clocks after its last column and that the
// rows follow on consecutive clocks.
module tb_idct2d_8x8;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int DW = 9;
  localparam int NBLK = 150;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DW+7:0] in_col [8];
  logic signed [DW-1:0] out_row [8];
  int checks = 0, failures = 0, saturated = 0;
  int cycle = 0;
  real max_err = 0.0;

  idct2d_8x8 #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real x [8][8]; int t_last; } blk_t;
  blk_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int row = 0, t_prev = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (row == 0 && cycle - q[0].t_last != IDCT2D_LATENCY) begin
          failures++;
          $display("first row after %0d clocks", cycle - q[0].t_last);
        end
        if (row != 0 && cycle != t_prev + 1) begin
          failures++;
          $display("rows not consecutive");
        end
        t_prev = cycle;
        for (int n = 0; n < 8; n++) begin
          checks++;
          err = fabs(real'(out_row[n]) - q[0].x[row][n]);
          if (err > max_err) max_err = err;
          if (err > 2.0) begin
            failures++;
            if (failures < 10)
              $display("X[%0d][%0d] = %0d, expected %f", row, n, out_row[n], q[0].x[row][n]);
          end
        end
        row++;
        if (row == 8) begin
          row = 0;
          void'(q.pop_front());
        end
      end
    end
  end

  // send integer coefficients zb[k1][k2] column by column; xexp is the
  // expected reconstruction
  task automatic send_block(input int zb [8][8], input real xexp [8][8], input bit gaps);
    blk_t b;
    b.x = xexp;
    for (int k2 = 0; k2 < 8; k2++) begin
      for (int k1 = 0; k1 < 8; k1++) in_col[k1] = (DW + 8)'(zb[k1][k2]);
      if (k2 == 7) begin
        b.t_last = cycle;
        q.push_back(b);
      end
      in_valid = 1'b1;
      @(posedge clk); #1;
      in_valid = 1'b0;
      if (gaps && $urandom_range(2) == 0) begin
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
  endtask

  task automatic random_block(input bit gaps);
    int   zb [8][8];
    real  xr [8][8];
    real  rr [8][8];
    real  v [8];
    foreach (xr[r, n]) xr[r][n] = real'(int'($urandom_range(511)) - 256);
    for (int r = 0; r < 8; r++) begin
      v = xr[r];
      for (int k = 0; k < 8; k++) rr[r][k] = dct_ref(8, v, k);
    end
    for (int k2 = 0; k2 < 8; k2++) begin
      for (int r = 0; r < 8; r++) v[r] = rr[r][k2];
      for (int k1 = 0; k1 < 8; k1++) zb[k1][k2] = $rtoi(dct_ref(8, v, k1) + 100000.5) - 100000;
    end
    send_block(zb, xr, gaps);
  endtask

  task automatic dc_block(input int level);
    int  zb [8][8];
    real xr [8][8];
    foreach (zb[a, b]) zb[a][b] = 0;
    zb[0][0] = 64 * level;
    foreach (xr[r, n]) xr[r][n] = (level > 255) ? 255.0 : (level < -256) ? -256.0 : real'(level);
    if (level > 255 || level < -256) saturated++;
    send_block(zb, xr, 1'b0);
  endtask

  initial begin
    for (int i = 0; i < 8; i++) in_col[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    dc_block(100);
    dc_block(400);
    dc_block(-400);
    for (int b = 0; b < NBLK; b++) random_block($urandom_range(1) == 0);
    repeat (IDCT2D_LATENCY + 10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d blocks never came out", q.size());
    end
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
