// qam64_mapper_tb: self-checking test of qam64_mapper.
//
// All 64 bit patterns are mapped and compared with the labelled
// constellation: the in-phase level is -7, -5, ..., +7 for b[5:3] = 0..7 and
// the quadrature level +7, +5, ..., -7 for b[2:0] = 0..7, scaled by 2**8.
// A few points are also checked against their printed labels (000000 at
// (-7, +7), 111111 at (+7, -7), 100011 at (+1, +1)). The symbol must appear
// one clock after its bits, and the two published symbols 110010 and 011101
// must give (+5, +3) and (-1, -3).
module qam64_mapper_tb;
  logic clk = 0, reset = 0, valid_in = 0;
  logic [5:0] bits = '0;
  logic [31:0] data_out;
  logic vout;
  int checks = 0, failures = 0;

  qam64_mapper #(.IQ_W(16), .FRAC(8)) dut (
    .clk, .reset, .output_interleaver(bits), .valid_in, .data_out, .valid_out(vout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Levels listed from the constellation, independent of any formula.
  int i_levels[8] = '{-7, -5, -3, -1, 1, 3, 5, 7};
  int q_levels[8] = '{7, 5, 3, 1, -1, -3, -5, -7};

  task automatic map_and_check(input logic [5:0] b, input int ei, input int eq);
    bits     <= b;
    valid_in <= 1'b1;
    @(posedge clk);
    valid_in <= 1'b0;
    #1;
    check(vout, "valid_out one clock after valid_in");
    check(int'($signed(data_out[31:16])) == ei * 256 && int'($signed(data_out[15:0])) == eq * 256,
          $sformatf("bits %b gave (%0d, %0d), expected (%0d, %0d)", b,
                    $signed(data_out[31:16]), $signed(data_out[15:0]), ei * 256, eq * 256));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(!vout, "no output in reset");
    reset <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 64; b++) map_and_check(6'(b), i_levels[b / 8], q_levels[b % 8]);
    map_and_check(6'b000000, -7, 7);
    map_and_check(6'b111111, 7, -7);
    map_and_check(6'b100011, 1, 1);
    map_and_check(6'b110010, 5, 3);
    map_and_check(6'b011101, -1, -3);
    @(posedge clk);
    #1 check(!vout, "valid_out drops with valid_in");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
