// block_interleaver_tb: self-checking test of block_interleaver (4 x 3).
//
// First the published example: rows 111 101 000 011 must give the block
// 1100 1001 1101, sent as the words 110010 and 011101. Then random blocks
// are written back to back (one row per clock) and with random gaps; a
// software model that stores the rows in a 2-D array and reads it column
// by column gives the expected words. Each block's first word must appear
// one clock after its last row.
module block_interleaver_tb;
  localparam int R = 4, C = 3, W = 6, T = R * C;
  logic clk = 0, reset = 0, valid_in = 0;
  logic [C-1:0] row_in = '0;
  logic [W-1:0] word;
  logic vout, bvalid;
  logic [T-1:0] block;
  int checks = 0, failures = 0;

  block_interleaver #(.ROWS(R), .COLS(C), .OUT_W(W)) dut (
    .clk, .reset, .row_in, .valid_in, .output_interleaver(word), .valid_out(vout),
    .block_out(block), .block_valid(bvalid));

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

  // expected words, queued by the driver
  logic [W-1:0] exp_q[$];
  logic [T-1:0] exp_blk_q[$];
  int cycle = 0, last_row_cycle[$];
  // Counted on the falling edge so that it is stable at every rising edge.
  always @(negedge clk) cycle++;

  task automatic send_block(input logic [C-1:0] rows[R], input bit gaps);
    logic [T-1:0] flat;
    int k;
    k = T - 1;
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++) begin
        flat[k] = rows[r][C-1-c];
        k--;
      end
    for (int j = 0; j < T / W; j++) exp_q.push_back(flat[T-1-j*W -: W]);
    exp_blk_q.push_back(flat);
    for (int r = 0; r < R; r++) begin
      row_in   <= rows[r];
      valid_in <= 1'b1;
      @(posedge clk);
      if (r == R - 1) last_row_cycle.push_back(cycle);
      if (gaps && $urandom_range(2) == 0) begin
        valid_in <= 1'b0;
        @(posedge clk);
      end
    end
  endtask

  // monitor
  int words_seen = 0;
  bit first_of_block = 1;
  always @(posedge clk) begin
    if (reset && vout) begin
      logic [W-1:0] e;
      e = exp_q.pop_front();
      check(word == e, $sformatf("word %b expected %b", word, e));
      if (first_of_block) begin
        int lr;
        lr = last_row_cycle.pop_front();
        // registered on the edge after the last row is sampled; this monitor
        // sees registered outputs one edge later
        check(cycle == lr + 2, $sformatf("first word at cycle %0d, last row at %0d", cycle, lr));
      end
      words_seen++;
      first_of_block = (words_seen % (T / W)) == 0;
    end
    if (reset && bvalid) begin
      logic [T-1:0] eb;
      eb = exp_blk_q.pop_front();
      check(block == eb, $sformatf("block %b expected %b", block, eb));
    end
  end

  initial begin
    logic [C-1:0] rows[R];
    repeat (3) @(posedge clk);
    reset <= 1'b1;
    @(posedge clk);
    rows = '{3'b111, 3'b101, 3'b000, 3'b011};
    send_block(rows, 0);
    valid_in <= 1'b0;
    repeat (4) @(posedge clk);
    check(words_seen == 2, "example gives two words");
    for (int b = 0; b < 300; b++) begin
      foreach (rows[r]) rows[r] = C'($urandom);
      send_block(rows, b >= 150);
    end
    valid_in <= 1'b0;
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "every expected word was produced");
    check(words_seen == 301 * T / W, "word count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the published example, checked literally
  always @(posedge clk) if (reset && bvalid && words_seen == 0)
    begin checks++; if (block !== 12'b110010011101) begin failures++; $display("FAIL: example block %b", block); end end
endmodule
