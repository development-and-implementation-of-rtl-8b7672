// conv_encoder_tb: self-checking test of conv_encoder.
//
// First the published trellis example: input 1 0 1 0 from state 000000
// must give code words 111 101 000 011 and the state sequence
// 000000 -> 100000 -> 010000 -> 101000 -> 010100. Then random frames, with
// gaps in valid_in, are checked against the encoder equations
//   y1 = x(n)+x(n-1)+x(n-2)+x(n-3)+x(n-6)
//   y2 = x(n)+x(n-2)+x(n-3)+x(n-5)+x(n-6)
//   y3 = x(n)+x(n-1)+x(n-2)+x(n-4)+x(n-6)   (mod 2)
// evaluated on a bit history that restarts at zero every frame. The code
// word must appear exactly one clock after its bit.
module conv_encoder_tb;
  import conv_pkg::*;

  localparam int FL = 4;
  logic clk = 0, reset = 0, input_data = 0, valid_in = 0;
  codeword_t enc;
  logic vout;
  state_t cur_s, nxt_s;
  int checks = 0, failures = 0;

  conv_encoder #(.FRAME_LEN(FL)) dut (
    .clk, .reset, .input_data, .valid_in,
    .encoder_output(enc), .valid_out(vout), .current_state(cur_s), .next_state(nxt_s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive one bit, then check the registered result on the next clock.
  logic [6:0] hist;  // hist[0] = x(n), hist[k] = x(n-k)
  int pos;
  task automatic send(input logic b, input codeword_t exp_cw,
                      input state_t exp_cur, input state_t exp_nxt, input bit chk_state);
    input_data <= b;
    valid_in   <= 1'b1;
    @(posedge clk);
    valid_in   <= 1'b0;
    #1;
    check(vout == 1'b1, "valid_out one clock after valid_in");
    check(enc == exp_cw, $sformatf("code word %b expected %b", enc, exp_cw));
    if (chk_state) begin
      check(cur_s == exp_cur, $sformatf("current_state %b expected %b", cur_s, exp_cur));
      check(nxt_s == exp_nxt, $sformatf("next_state %b expected %b", nxt_s, exp_nxt));
    end
  endtask

  function automatic codeword_t ref_cw(input logic [6:0] h);
    return {h[0]^h[1]^h[2]^h[3]^h[6], h[0]^h[2]^h[3]^h[5]^h[6], h[0]^h[1]^h[2]^h[4]^h[6]};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    #1 check(vout == 1'b0, "no output during reset");
    reset <= 1'b1;
    @(posedge clk);
    // published example
    send(1'b1, 3'b111, 6'b000000, 6'b100000, 1);
    send(1'b0, 3'b101, 6'b100000, 6'b010000, 1);
    send(1'b1, 3'b000, 6'b010000, 6'b101000, 1);
    send(1'b0, 3'b011, 6'b101000, 6'b010100, 1);
    // random frames with gaps
    for (int f = 0; f < 200; f++) begin
      hist = '0;
      for (pos = 0; pos < FL; pos++) begin
        logic b;
        b = 1'($urandom);
        hist = {hist[5:0], b};
        send(b, ref_cw(hist), '0, '0, 0);
        if ($urandom_range(3) == 0) @(posedge clk);
      end
    end
    // reset in mid-frame clears the register
    send(1'b1, 3'b111, 6'b000000, 6'b100000, 1);
    reset <= 1'b0;
    @(posedge clk);
    reset <= 1'b1;
    send(1'b1, 3'b111, 6'b000000, 6'b100000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
