// transpose_buffer: ping-pong N x N transposition memory for the row-column
// 2-D transform.
//
// Vectors written one per clock are the rows of an N x N block; once the
// N-th row of a block is in, the block is read out as its N columns, one per
// clock, while the next block fills the other bank. Because a block takes at
// least N clocks to write and exactly N clocks to read, a bank is always
// drained before it is written again, so there is no back-pressure and the
// throughput is one vector per clock. The row-column method is the
// document's; the buffer itself (two banks of registers, no stall) is this
// design's choice.
//
// Interface: in_valid/in_vec write row number "row count mod N" of the
// current bank; out_valid/out_vec give column c of the finished block, c =
// 0..N-1 on consecutive clocks (out_vec[r] = row r, column c).
// Timing: the first column appears TRANSPOSE_LATENCY = 2 clocks after the
// clock in which the last row is presented. Synchronous active-low reset
// empties both banks' bookkeeping (the contents are not cleared).
module transpose_buffer
  import cordic_dct_pkg::*;
#(
  parameter int W = 13,
  parameter int N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_vec [N],
  output logic                 out_valid,
  output logic signed [W-1:0]  out_vec [N]
);

  localparam int AB = $clog2(N);

  logic signed [W-1:0] mem [2][N][N];   // [bank][row][column]
  logic                wbank, rbank, reading;
  logic [AB-1:0]       wrow, rcol;

  // write side
  always_ff @(posedge clk) begin
    if (in_valid) mem[wbank][wrow] <= in_vec;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      wrow  <= '0;
    end else if (in_valid) begin
      wrow <= (wrow == AB'(N - 1)) ? '0 : wrow + 1'b1;
      if (wrow == AB'(N - 1)) wbank <= ~wbank;
    end
  end

  // read side: starts on the clock after a bank is completed
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading <= 1'b0;
      rbank   <= 1'b0;
      rcol    <= '0;
    end else if (in_valid && wrow == AB'(N - 1)) begin
      reading <= 1'b1;
      rbank   <= wbank;
      rcol    <= '0;
    end else if (reading) begin
      rcol    <= rcol + 1'b1;
      if (rcol == AB'(N - 1)) reading <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= reading;
    for (int r = 0; r < N; r++) out_vec[r] <= mem[rbank][r][rcol];
  end

  // A bank must be drained before it is written again.
  assert property (@(posedge clk) disable iff (!rst_n)
                   reading && in_valid |-> wbank != rbank)
    else $error("transpose_buffer: write into the bank being read");

endmodule
