// tb_dct2d_8x8: self-checking test of the row-column 2-D 8x8 forward DCT.
//
// Sends blocks of random 9-bit residuals (plus an all-max and an all-min
// block), row by row, some back to back and some with idle clocks, and
// compares every output column with the floating-point 2-D DCT
// Z = F*X*F^T (F = sqrt(8) times the orthonormal DCT-II), within 4 LSB plus
// 0.4% of the block's L1 norm. Checks that each block's first column comes
// DCT2D_LATENCY clocks after its last row and that its columns follow on
// consecutive clocks.
module tb_dct2d_8x8;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int DW = 9;
  localparam int NBLK = 150;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [DW-1:0] in_row [8];
  logic signed [DW+7:0] out_col [8];
  int checks = 0, failures = 0;
  int cycle = 0;
  real max_err = 0.0;

  dct2d_8x8 #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { real z [8][8]; real tol; int t_last; } blk_t;
  blk_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int col = 0, t_prev = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (col == 0 && cycle - q[0].t_last != DCT2D_LATENCY) begin
          failures++;
          $display("first column after %0d clocks", cycle - q[0].t_last);
        end
        if (col != 0 && cycle != t_prev + 1) begin
          failures++;
          $display("columns not consecutive");
        end
        t_prev = cycle;
        for (int k1 = 0; k1 < 8; k1++) begin
          checks++;
          err = fabs(real'(out_col[k1]) - q[0].z[k1][col]);
          if (err > max_err) max_err = err;
          if (err > q[0].tol) begin
            failures++;
            if (failures < 10)
              $display("Z[%0d][%0d] = %0d, expected %f", k1, col, out_col[k1], q[0].z[k1][col]);
          end
        end
        col++;
        if (col == 8) begin
          col = 0;
          void'(q.pop_front());
        end
      end
    end
  end

  task automatic send_block(input int xb [8][8], input bit gaps);
    blk_t b;
    real rr [8][8];
    real v [8];
    real l1 = 0.0;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) begin
        v[n] = xb[r][n];
        l1 += fabs(v[n]);
      end
      for (int k = 0; k < 8; k++) rr[r][k] = dct_ref(8, v, k);
    end
    for (int k2 = 0; k2 < 8; k2++) begin
      for (int r = 0; r < 8; r++) v[r] = rr[r][k2];
      for (int k1 = 0; k1 < 8; k1++) b.z[k1][k2] = dct_ref(8, v, k1);
    end
    b.tol = 4.0 + 0.004 * l1;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) in_row[n] = DW'(xb[r][n]);
      if (r == 7) begin
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

  initial begin
    int xb [8][8];
    for (int i = 0; i < 8; i++) in_row[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    foreach (xb[r, n]) xb[r][n] = 255;
    send_block(xb, 1'b0);
    foreach (xb[r, n]) xb[r][n] = -256;
    send_block(xb, 1'b0);
    foreach (xb[r, n]) xb[r][n] = ((r + n) % 2 != 0) ? -256 : 255;
    send_block(xb, 1'b0);
    for (int b = 0; b < NBLK; b++) begin
      foreach (xb[r, n]) xb[r][n] = int'($urandom_range(511)) - 256;
      send_block(xb, $urandom_range(1) == 0);
    end
    repeat (DCT2D_LATENCY + 10) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d blocks never came out", q.size());
    end
    $display("max abs error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
