// block_deinterleaver: inverse of block_interleaver.
//
// The column-wise stream of one ROWS x COLS block arrives as IN_W-bit words
// (earliest bit in the MSB, one word per clock while valid_in is high).
// When a block is complete it is read back row by row, one COLS-bit code
// word per clock on row_out (leftmost column, y1, in the MSB), which is the
// order the encoder produced them in. The first row leaves one clock after
// the last word of the block arrives.
//
// Two block buffers alternate (ping-pong) so the next block can arrive while
// the previous one is being read out. A block is read in ROWS clocks and
// arrives in ROWS*COLS/IN_W clocks at the earliest; words must not arrive
// faster on average than ROWS*COLS bits per ROWS clocks (the rate the
// transmitter produces), which an assertion checks. The structure mirrors the
// published interleaver; buffering, strobes and the active-low synchronous
// reset are this design's choices.
module block_deinterleaver #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 3,
  parameter int unsigned IN_W = 6
) (
  input  logic            clk,
  input  logic            reset,      // active low
  input  logic [IN_W-1:0] data_in,
  input  logic            valid_in,
  output logic [COLS-1:0] row_out,
  output logic            valid_out
);

  localparam int unsigned TOTAL  = ROWS * COLS;
  localparam int unsigned NCHUNK = TOTAL / IN_W;
  localparam int unsigned ROW_W  = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned CH_W   = (NCHUNK > 1) ? $clog2(NCHUNK) : 1;

  // Each buffer is kept in arrival (column-wise) order: bit TOTAL-1 first.
  logic [TOTAL-1:0] buf_q [2];
  logic [1:0]       full_q;
  logic             wsel_q, rsel_q;
  logic [CH_W-1:0]  wchunk_q;
  logic [ROW_W-1:0] rrow_q;

  logic [TOTAL-1:0] wr_next;
  always_comb begin
    wr_next = buf_q[wsel_q];
    wr_next[TOTAL-1-int'(wchunk_q)*IN_W -: IN_W] = data_in;
  end

  // Row rrow_q of the read buffer: bit c*ROWS + r of the column stream.
  logic [COLS-1:0] rd_row;
  always_comb begin
    for (int c = 0; c < COLS; c++)
      rd_row[COLS-1-c] = buf_q[rsel_q][TOTAL-1-(c*ROWS + int'(rrow_q))];
  end

  wire last_chunk = (wchunk_q == CH_W'(NCHUNK - 1));
  wire last_row   = (rrow_q == ROW_W'(ROWS - 1));

  always_ff @(posedge clk) begin
    if (!reset) begin
      buf_q[0]  <= '0;
      buf_q[1]  <= '0;
      full_q    <= '0;
      wsel_q    <= 1'b0;
      rsel_q    <= 1'b0;
      wchunk_q  <= '0;
      rrow_q    <= '0;
      row_out   <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= 1'b0;
      if (full_q[rsel_q]) begin
        row_out   <= rd_row;
        valid_out <= 1'b1;
        if (last_row) begin
          rrow_q         <= '0;
          full_q[rsel_q] <= 1'b0;
          rsel_q         <= ~rsel_q;
        end else begin
          rrow_q <= rrow_q + 1'b1;
        end
      end
      if (valid_in) begin
        buf_q[wsel_q] <= wr_next;
        if (last_chunk) begin
          wchunk_q       <= '0;
          full_q[wsel_q] <= 1'b1;
          wsel_q         <= ~wsel_q;
        end else begin
          wchunk_q <= wchunk_q + 1'b1;
        end
      end
    end
  end

  initial assert (TOTAL % IN_W == 0) else $error("ROWS*COLS must be a multiple of IN_W");

  a_no_overwrite: assert property (@(posedge clk) disable iff (!reset)
    valid_in |-> !full_q[wsel_q]);

endmodule
