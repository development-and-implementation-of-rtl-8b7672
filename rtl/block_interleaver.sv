// block_interleaver: row-in / column-out block interleaver.
//
// Code words enter one per clock as rows of a ROWS x COLS array (row_in,
// leftmost column in the MSB). When the last row of a block is written, the
// block is read out column by column, top to bottom, OUT_W bits per clock on
// output_interleaver (earliest bit in the MSB), which is the width of one
// 64-QAM symbol. With the default 4 x 3 array the rows 111 101 000 011 give
// the stream 1100 1001 1101, sent as the words 110010 and 011101. The whole
// interleaved block is also presented on block_out for one clock
// (block_valid) when it completes.
//
// Two block buffers alternate (ping-pong), so a new block can be written
// while the previous one is read; reading a block takes
// ROWS*COLS/OUT_W clocks, which must not exceed ROWS, so a buffer is always
// free when a writer needs it. The row/column order and the array shape
// follow the published interleaver; the buffering, the OUT_W-bit output
// words, the valid strobes and the active-low synchronous reset are this
// design's choices. The first word leaves one clock after the last row is
// written.
module block_interleaver #(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned COLS  = 3,
  parameter int unsigned OUT_W = 6
) (
  input  logic                 clk,
  input  logic                 reset,              // active low
  input  logic [COLS-1:0]      row_in,
  input  logic                 valid_in,
  output logic [OUT_W-1:0]     output_interleaver,
  output logic                 valid_out,
  output logic [ROWS*COLS-1:0] block_out,
  output logic                 block_valid
);

  localparam int unsigned TOTAL  = ROWS * COLS;
  localparam int unsigned NCHUNK = TOTAL / OUT_W;
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CH_W   = (NCHUNK > 1) ? $clog2(NCHUNK) : 1;

  // Each buffer is kept in read order: bit TOTAL-1 is read first.
  logic [TOTAL-1:0] buf_q [2];
  logic [1:0]       full_q;
  logic             wsel_q, rsel_q;
  logic [ROW_W-1:0] wrow_q;
  logic [CH_W-1:0]  rchunk_q;

  // Buffer contents after writing row_in as row wrow_q.
  logic [TOTAL-1:0] wr_next;
  always_comb begin
    wr_next = buf_q[wsel_q];
    for (int c = 0; c < COLS; c++)
      wr_next[TOTAL-1-(c*ROWS + int'(wrow_q))] = row_in[COLS-1-c];
  end

  wire last_row   = (wrow_q == ROW_W'(ROWS - 1));
  wire last_chunk = (rchunk_q == CH_W'(NCHUNK - 1));

  always_ff @(posedge clk) begin
    if (!reset) begin
      buf_q[0]           <= '0;
      buf_q[1]           <= '0;
      full_q             <= '0;
      wsel_q             <= 1'b0;
      rsel_q             <= 1'b0;
      wrow_q             <= '0;
      rchunk_q           <= '0;
      output_interleaver <= '0;
      valid_out          <= 1'b0;
      block_out          <= '0;
      block_valid        <= 1'b0;
    end else begin
      valid_out   <= 1'b0;
      block_valid <= 1'b0;
      // read side: one OUT_W-bit word per clock from a full buffer
      if (full_q[rsel_q]) begin
        output_interleaver <= buf_q[rsel_q][TOTAL-1-int'(rchunk_q)*OUT_W -: OUT_W];
        valid_out          <= 1'b1;
        if (last_chunk) begin
          rchunk_q       <= '0;
          full_q[rsel_q] <= 1'b0;
          rsel_q         <= ~rsel_q;
        end else begin
          rchunk_q <= rchunk_q + 1'b1;
        end
      end
      // write side: one row per clock into the free buffer
      if (valid_in) begin
        buf_q[wsel_q] <= wr_next;
        if (last_row) begin
          wrow_q         <= '0;
          full_q[wsel_q] <= 1'b1;
          wsel_q         <= ~wsel_q;
          block_out      <= wr_next;
          block_valid    <= 1'b1;
        end else begin
          wrow_q <= wrow_q + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (TOTAL % OUT_W == 0) else $error("ROWS*COLS must be a multiple of OUT_W");
    assert (NCHUNK <= ROWS) else $error("read-out of a block must not take longer than its write");
  end

  // A row may only be written into a buffer that has been read out.
  a_no_overwrite: assert property (@(posedge clk) disable iff (!reset)
    valid_in |-> !full_q[wsel_q]);

endmodule
