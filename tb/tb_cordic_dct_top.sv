// tb_cordic_dct_top: end-to-end test of the transform pair, default sizes.
//
// Plays the encoder loop around the top: residual blocks go into the forward
// 2-D DCT; every output column is quantized and dequantized by the testbench
// (c -> round(c/q)*q, q chosen per block; q = 1 is lossless) and fed straight
// into the inverse 2-D DCT on the next clock. Checks:
//   - forward columns against the floating-point 2-D DCT of the block
//     (4 LSB plus 0.4% of the block's L1 norm),
//   - reconstructed rows against the floating-point inverse of the
//     dequantized coefficients, saturated to 9 bits (2 LSB), which for q = 1
//     is also checked against the original block,
//   - latency of both halves (DCT2D_LATENCY, IDCT2D_LATENCY clocks) and that
//     columns and rows of a block come on consecutive clocks.
// Counts the mechanisms of the design and fails if one never occurred:
// idle clocks between input rows, blocks streamed back to back (a transpose
// bank written while the other is read), lossless round trips, quantized
// round trips, and saturation of the reconstruction.
module tb_cordic_dct_top;
  import cordic_dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int DW = 9;
  localparam int CW = DW + 8;
  localparam int NBLK = 120;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fwd_in_valid = 1'b0, fwd_out_valid, inv_in_valid = 1'b0, inv_out_valid;
  logic signed [DW-1:0] fwd_in_row [8];
  logic signed [CW-1:0] fwd_out_col [8];
  logic signed [CW-1:0] inv_in_col [8];
  logic signed [DW-1:0] inv_out_row [8];

  int checks = 0, failures = 0, cycle = 0;
  int n_gaps = 0, n_overlap = 0, n_lossless = 0, n_quant = 0, n_sat = 0;
  real max_rt_err = 0.0;

  cordic_dct_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real z [8][8]; real x [8][8]; real tol; int q; int t_last; } fwd_t;
  typedef struct { real x [8][8]; real orig [8][8]; int t_last; bit lossless; } inv_t;
  fwd_t fq [$];
  inv_t iq [$];

  function automatic int quant(input int c, input int q);
    int m;
    m = (c >= 0) ? (c + q / 2) / q : -((-c + q / 2) / q);
    return m * q;
  endfunction

  // forward checker and quantize/dequantize loopback
  int   fcol = 0, f_prev = 0;
  real  zq [8][8];
  always @(posedge clk) begin
    inv_in_valid <= 1'b0;
    if (rst_n && fwd_out_valid) begin
      real err;
      int  c;
      checks++;
      if (fq.size() == 0) begin
        failures++;
        $display("unexpected forward output");
      end else begin
        if (fcol == 0 && cycle - fq[0].t_last != DCT2D_LATENCY) begin
          failures++;
          $display("forward: first column after %0d clocks", cycle - fq[0].t_last);
        end
        if (fcol != 0 && cycle != f_prev + 1) begin
          failures++;
          $display("forward columns not consecutive");
        end
        f_prev = cycle;
        for (int k1 = 0; k1 < 8; k1++) begin
          checks++;
          err = fabs(real'(fwd_out_col[k1]) - fq[0].z[k1][fcol]);
          if (err > fq[0].tol) begin
            failures++;
            if (failures < 10)
              $display("Z[%0d][%0d] = %0d, expected %f", k1, fcol, fwd_out_col[k1], fq[0].z[k1][fcol]);
          end
          c = quant(int'(fwd_out_col[k1]), fq[0].q);
          zq[k1][fcol] = real'(c);
          inv_in_col[k1] <= CW'(c);
        end
        inv_in_valid <= 1'b1;
        fcol++;
        if (fcol == 8) begin
          inv_t e;
          real rr [8][8];
          real v [8];
          // expected reconstruction: inverse of the dequantized block
          for (int k2 = 0; k2 < 8; k2++) begin
            for (int k1 = 0; k1 < 8; k1++) v[k1] = zq[k1][k2];
            for (int r = 0; r < 8; r++) rr[r][k2] = idct_ref(v, r);
          end
          for (int r = 0; r < 8; r++) begin
            v = rr[r];
            for (int n = 0; n < 8; n++) begin
              e.x[r][n] = idct_ref(v, n);
              if (e.x[r][n] > 255.5)  begin e.x[r][n] = 255.0;  n_sat++; end
              if (e.x[r][n] < -256.5) begin e.x[r][n] = -256.0; n_sat++; end
            end
          end
          e.t_last = cycle + 1;
          e.lossless = (fq[0].q == 1);
          e.orig = fq[0].x;
          if (e.lossless) n_lossless++; else n_quant++;
          iq.push_back(e);
          fcol = 0;
          void'(fq.pop_front());
        end
      end
    end
  end

  // inverse checker
  int irow = 0, i_prev = 0;
  always @(posedge clk) begin
    if (rst_n && inv_out_valid) begin
      real err;
      checks++;
      if (iq.size() == 0) begin
        failures++;
        $display("unexpected inverse output");
      end else begin
        if (irow == 0 && cycle - iq[0].t_last != IDCT2D_LATENCY) begin
          failures++;
          $display("inverse: first row after %0d clocks", cycle - iq[0].t_last);
        end
        if (irow != 0 && cycle != i_prev + 1) begin
          failures++;
          $display("inverse rows not consecutive");
        end
        i_prev = cycle;
        for (int n = 0; n < 8; n++) begin
          checks++;
          err = fabs(real'(inv_out_row[n]) - iq[0].x[irow][n]);
          if (iq[0].lossless) begin
            // lossless: the original block must come back too
            checks++;
            err = fabs(real'(inv_out_row[n]) - iq[0].orig[irow][n]);
            if (err > max_rt_err) max_rt_err = err;
            if (err > 2.0) begin
              failures++;
              if (failures < 10)
                $display("round trip X'[%0d][%0d] = %0d, original %f", irow, n, inv_out_row[n], iq[0].orig[irow][n]);
            end
            err = fabs(real'(inv_out_row[n]) - iq[0].x[irow][n]);
          end
          if (err > 2.0) begin
            failures++;
            if (failures < 10)
              $display("X'[%0d][%0d] = %0d, expected %f", irow, n, inv_out_row[n], iq[0].x[irow][n]);
          end
        end
        irow++;
        if (irow == 8) begin
          irow = 0;
          void'(iq.pop_front());
        end
      end
    end
  end

  // a forward row written while the transpose buffer is being read
  always @(posedge clk) if (fwd_in_valid && fwd_out_valid) n_overlap++;

  task automatic send_block(input int xb [8][8], input int q, input bit gaps);
    fwd_t b;
    real rr [8][8];
    real v [8];
    real l1 = 0.0;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) begin
        v[n] = xb[r][n];
        b.x[r][n] = v[n];
        l1 += fabs(v[n]);
      end
      for (int k = 0; k < 8; k++) rr[r][k] = dct_ref(8, v, k);
    end
    for (int k2 = 0; k2 < 8; k2++) begin
      for (int r = 0; r < 8; r++) v[r] = rr[r][k2];
      for (int k1 = 0; k1 < 8; k1++) b.z[k1][k2] = dct_ref(8, v, k1);
    end
    b.tol = 4.0 + 0.004 * l1;
    b.q = q;
    for (int r = 0; r < 8; r++) begin
      for (int n = 0; n < 8; n++) fwd_in_row[n] = DW'(xb[r][n]);
      if (r == 7) begin
        b.t_last = cycle;
        fq.push_back(b);
      end
      fwd_in_valid = 1'b1;
      @(posedge clk); #1;
      fwd_in_valid = 1'b0;
      if (gaps && $urandom_range(2) == 0) begin
        n_gaps++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
      end
    end
  endtask

  task automatic count(input string what, input int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("  never happened");
    end
  endtask

  initial begin
    int xb [8][8];
    int qs [4];
    qs = '{1, 1, 16, 64};
    for (int i = 0; i < 8; i++) fwd_in_row[i] = '0;
    for (int i = 0; i < 8; i++) inv_in_col[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // flat block, coarse step: DC rounds up, reconstruction saturates
    foreach (xb[r, n]) xb[r][n] = 255;
    send_block(xb, 10000, 1'b0);
    foreach (xb[r, n]) xb[r][n] = -256;
    send_block(xb, 10000, 1'b0);
    foreach (xb[r, n]) xb[r][n] = ((r + n) % 2 != 0) ? -256 : 255;
    send_block(xb, 1, 1'b0);
    for (int b = 0; b < NBLK; b++) begin
      foreach (xb[r, n]) xb[r][n] = int'($urandom_range(511)) - 256;
      send_block(xb, qs[$urandom_range(3)], $urandom_range(1) == 0);
    end
    repeat (DCT2D_LATENCY + IDCT2D_LATENCY + 20) @(posedge clk);
    checks++;
    if (fq.size() != 0 || iq.size() != 0) begin
      failures++;
      $display("blocks lost: %0d forward, %0d inverse", fq.size(), iq.size());
    end
    count("idle clocks between rows:", n_gaps);
    count("rows written during column read:", n_overlap);
    count("lossless round trips:", n_lossless);
    count("quantized round trips:", n_quant);
    count("saturated reconstructed samples:", n_sat);
    $display("lossless round-trip max error %f", max_rt_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
