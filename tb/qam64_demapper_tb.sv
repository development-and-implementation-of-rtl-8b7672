// qam64_demapper_tb: self-checking test of qam64_demapper.
//
// Every one of the 64 constellation points, written directly as fixed-point
// numbers (level * 256), is sent with random noise of less than one level
// on each axis; the demapper must return the point's label (b[5:3] counts the
// in-phase level from -7 upward, b[2:0] the quadrature level from +7
// downward). Values beyond the outer levels, and exactly on a threshold
// (ties go to the upper level), are checked too, as is the one-clock
// latency.
module qam64_demapper_tb;
  logic clk = 0, reset = 0, valid_in = 0;
  logic [31:0] data_in = '0;
  logic [5:0] bits;
  logic vout;
  int checks = 0, failures = 0;

  qam64_demapper #(.IQ_W(16), .FRAC(8)) dut (
    .clk, .reset, .data_in, .valid_in, .bits_out(bits), .valid_out(vout));

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

  task automatic demap_and_check(input int i_val, input int q_val, input logic [5:0] exp);
    data_in  <= {16'(i_val), 16'(q_val)};
    valid_in <= 1'b1;
    @(posedge clk);
    valid_in <= 1'b0;
    #1;
    check(vout, "valid_out one clock after valid_in");
    check(bits == exp, $sformatf("(%0d, %0d) gave %b, expected %b", i_val, q_val, bits, exp));
  endtask

  int i_levels[8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int q_levels[8] = '{7, 5, 3, 1, -1, -3, -5, -7};

  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b1;
    @(posedge clk);
    for (int rep = 0; rep < 20; rep++)
      for (int b = 0; b < 64; b++) begin
        int ni, nq;
        ni = $urandom_range(510) - 255;   // |noise| < one level (256)
        nq = $urandom_range(510) - 255;
        demap_and_check(i_levels[b / 8] * 256 + ni, q_levels[b % 8] * 256 + nq, 6'(b));
      end
    demap_and_check(-30 * 256, 30 * 256, 6'b000000);   // far outside
    demap_and_check(20 * 256, -20 * 256, 6'b111111);
    demap_and_check(0, 0, 6'b100011);                  // on both zero thresholds
    demap_and_check(-2 * 256, 2 * 256, 6'b011010);     // ties go up
    demap_and_check(-32768, 32767, 6'b000000);         // extremes of the format
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
