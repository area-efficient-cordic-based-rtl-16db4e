// tb_transpose_buffer: self-checking test of the ping-pong transpose memory.
//
// Writes 8x8 blocks of random 13-bit words, row by row, sometimes back to
// back and sometimes with idle clocks between rows, and checks that each
// block comes out as its 8 columns on 8 consecutive clocks, the first one
// TRANSPOSE_LATENCY clocks after the block's last row. Counts blocks that
// were written back to back (a bank written while the other is read) and
// checks that this happened.
module tb_transpose_buffer;
  import cordic_dct_pkg::*;

  localparam int W = 13;
  localparam int N = 8;
  localparam int NBLK = 200;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic signed [W-1:0] in_vec [N];
  logic signed [W-1:0] out_vec [N];
  int checks = 0, failures = 0, overlapped = 0;
  int cycle = 0;

  transpose_buffer #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int v [N][N]; int t_last; } blk_t;
  blk_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: columns of the oldest block, in order
  int col = 0;
  int t_prev = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        if (col == 0 && cycle - q[0].t_last != TRANSPOSE_LATENCY) begin
          failures++;
          $display("first column after %0d clocks", cycle - q[0].t_last);
        end
        if (col != 0 && cycle != t_prev + 1) begin
          failures++;
          $display("columns not consecutive");
        end
        t_prev = cycle;
        for (int r = 0; r < N; r++) begin
          checks++;
          if (int'(out_vec[r]) != q[0].v[r][col]) begin
            failures++;
            if (failures < 10)
              $display("col %0d row %0d: %0d, expected %0d", col, r, out_vec[r], q[0].v[r][col]);
          end
        end
        col++;
        if (col == N) begin
          col = 0;
          void'(q.pop_front());
        end
      end
    end
  end

  // overlap: a row written while a column is read
  always @(posedge clk) if (in_valid && out_valid) overlapped++;

  initial begin
    blk_t b;
    for (int i = 0; i < N; i++) in_vec[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    for (int n = 0; n < NBLK; n++) begin
      bit gaps;
      gaps = ($urandom_range(1) == 0);
      for (int r = 0; r < N; r++) begin
        for (int c = 0; c < N; c++) begin
          b.v[r][c] = int'($urandom_range((1 << W) - 1)) - (1 << (W - 1));
          in_vec[c] = W'(b.v[r][c]);
        end
        if (r == N - 1) begin
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
    end
    repeat (N + TRANSPOSE_LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d blocks never came out", q.size());
    end
    checks++;
    if (overlapped == 0) begin
      failures++;
      $display("never wrote one bank while reading the other");
    end
    $display("clocks with a write and a read: %0d", overlapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
