// block_deinterleaver_tb: self-checking test of block_deinterleaver (4 x 3).
//
// First the published example backwards: the words 110010 and 011101 must
// give back the rows 111 101 000 011. Then random blocks arrive at the
// transmitter's rate (two words every four clocks) and with extra gaps; a
// software model fills a 2-D array column by column and reads it row by
// row. The first row of each block must appear one clock after the block's
// last word, and the rows of a block on consecutive clocks.
module block_deinterleaver_tb;
  localparam int R = 4, C = 3, W = 6, T = R * C;
  logic clk = 0, reset = 0, valid_in = 0;
  logic [W-1:0] data_in = '0;
  logic [C-1:0] row;
  logic vout;
  int checks = 0, failures = 0;

  block_deinterleaver #(.ROWS(R), .COLS(C), .IN_W(W)) dut (
    .clk, .reset, .data_in, .valid_in, .row_out(row), .valid_out(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [C-1:0] exp_q[$];
  int cycle = 0, last_word_cycle[$], rows_seen = 0, prev_row_cycle = 0;
  // Counted on the falling edge so that it is stable at every rising edge.
  always @(negedge clk) cycle++;

  task automatic send_block(input logic [T-1:0] stream, input bit gaps);
    // model: stream bit k (from the MSB) is column k / R, row k % R
    logic [C-1:0] rows[R];
    for (int k = 0; k < T; k++) rows[k % R][C-1-(k / R)] = stream[T-1-k];
    for (int r = 0; r < R; r++) exp_q.push_back(rows[r]);
    for (int j = 0; j < T / W; j++) begin
      data_in  <= stream[T-1-j*W -: W];
      valid_in <= 1'b1;
      @(posedge clk);
      if (j == T / W - 1) last_word_cycle.push_back(cycle);
    end
    valid_in <= 1'b0;
    repeat (R - T / W) @(posedge clk);
    if (gaps) repeat ($urandom_range(3)) @(posedge clk);
  endtask

  always @(posedge clk) begin
    if (reset && vout) begin
      logic [C-1:0] e;
      e = exp_q.pop_front();
      check(row == e, $sformatf("row %b expected %b", row, e));
      if (rows_seen % R == 0) begin
        int lw;
        lw = last_word_cycle.pop_front();
        // registered on the edge after the last word is sampled; this monitor
        // sees registered outputs one edge later
        check(cycle == lw + 2, $sformatf("first row at cycle %0d, last word at %0d", cycle, lw));
      end else begin
        check(cycle == prev_row_cycle + 1, "rows of a block on consecutive clocks");
      end
      if (rows_seen < R) begin
        logic [C-1:0] printed[R];
        printed = '{3'b111, 3'b101, 3'b000, 3'b011};
        check(row == printed[rows_seen], "published example row");
      end
      prev_row_cycle = cycle;
      rows_seen++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b1;
    @(posedge clk);
    send_block(12'b110010011101, 0);
    for (int b = 0; b < 300; b++) send_block(T'($urandom), b >= 150);
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "every expected row was produced");
    check(rows_seen == 301 * R, "row count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
