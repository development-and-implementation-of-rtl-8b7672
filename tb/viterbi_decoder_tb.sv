// viterbi_decoder_tb: self-checking test of viterbi_decoder (4-bit frames).
//
// The reference is exhaustive maximum-likelihood decoding: every one of the
// 2**4 possible frames is encoded with the encoder equations
//   y1 = x(n)+x(n-1)+x(n-2)+x(n-3)+x(n-6)
//   y2 = x(n)+x(n-2)+x(n-3)+x(n-5)+x(n-6)
//   y3 = x(n)+x(n-1)+x(n-2)+x(n-4)+x(n-6)   (mod 2, from state 000000)
// and its Hamming distance to the received 12 bits is counted. The decoder
// must return a frame whose distance equals the minimum, and exactly the
// minimising frame when it is unique. Phases:
//   1. error-free frames, back to back, must decode exactly;
//   2. one flipped bit per frame (always correctable: any two frames differ
//      in at least three bits) must decode exactly;
//   3. two to four flipped bits, with gaps between words, ML check;
//   4. the published full-system example: received 110001010111, three
//      frames (0001, 1010, 1101) share the minimum distance 4.
// Timing: frame_valid must follow the last word of its frame by
// FRAME_LEN+2 clocks, the serial bits must follow one clock after it and
// must equal decoded_frame MSB first.
module viterbi_decoder_tb;
  import conv_pkg::codeword_t;

  localparam int FL = 4;
  localparam int NB = 3 * FL;
  logic clk = 0, reset = 0, valid_in = 0;
  codeword_t din = '0;
  logic obit, ovalid, fvalid;
  logic [FL-1:0] frame;
  int checks = 0, failures = 0;

  viterbi_decoder #(.FRAME_LEN(FL)) dut (
    .clk, .reset, .decoder_input(din), .valid_in,
    .output_data(obit), .valid_out(ovalid), .decoded_frame(frame), .frame_valid(fvalid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [NB-1:0] ref_encode(input logic [FL-1:0] f);
    logic [6:0] h;
    logic [NB-1:0] o;
    h = '0;
    for (int n = 0; n < FL; n++) begin
      h = {h[5:0], f[FL-1-n]};       // h[k] = x(n-k)
      o[NB-1-3*n]   = h[0]^h[1]^h[2]^h[3]^h[6];
      o[NB-1-3*n-1] = h[0]^h[2]^h[3]^h[5]^h[6];
      o[NB-1-3*n-2] = h[0]^h[1]^h[2]^h[4]^h[6];
    end
    return o;
  endfunction

  function automatic int hamming(input logic [NB-1:0] a, input logic [NB-1:0] b);
    return $countones(a ^ b);
  endfunction

  // Expected results, one per frame sent.
  typedef struct { logic [NB-1:0] rx; logic [FL-1:0] sent; int last_cycle; bit exact; } job_t;
  job_t jobs[$];
  int cycle = 0;
  always @(negedge clk) cycle++;   // stable at every rising edge

  task automatic send_frame(input logic [FL-1:0] f, input logic [NB-1:0] err, input bit gaps,
                            input bit exact);
    job_t j;
    j.rx = ref_encode(f) ^ err;
    j.sent = f;
    j.exact = exact;
    for (int n = 0; n < FL; n++) begin
      din      <= j.rx[NB-1-3*n -: 3];
      valid_in <= 1'b1;
      @(posedge clk);
      if (gaps && n != FL - 1 && $urandom_range(2) == 0) begin
        valid_in <= 1'b0;
        @(posedge clk);
      end
    end
    j.last_cycle = cycle;
    jobs.push_back(j);
  endtask

  // Frame monitor: ML property and latency.
  int frames_seen = 0, unique_seen = 0;
  logic [FL-1:0] ser_exp[$];
  always @(posedge clk) begin
    if (reset && fvalid) begin
      job_t j;
      int dmin, nmin, dgot;
      logic [FL-1:0] best;
      j = jobs.pop_front();
      dmin = NB + 1; nmin = 0; best = '0;
      for (int c = 0; c < (1 << FL); c++) begin
        int d;
        d = hamming(ref_encode(FL'(c)), j.rx);
        if (d < dmin) begin dmin = d; nmin = 1; best = FL'(c); end
        else if (d == dmin) nmin++;
      end
      dgot = hamming(ref_encode(frame), j.rx);
      check(dgot == dmin, $sformatf("rx %b: decoded %b at distance %0d, minimum %0d",
                                    j.rx, frame, dgot, dmin));
      if (nmin == 1) begin
        unique_seen++;
        check(frame == best, $sformatf("rx %b: decoded %b, unique ML frame %b", j.rx, frame, best));
      end
      if (j.exact)
        check(frame == j.sent, $sformatf("frame %b decoded as %b", j.sent, frame));
      // registered FL+2 edges after the last word; seen here one edge later
      check(cycle == j.last_cycle + FL + 3,
            $sformatf("frame out at %0d, last word at %0d", cycle, j.last_cycle));
      ser_exp.push_back(frame);
      frames_seen++;
    end
  end

  // Serial output: MSB first, starting the clock after frame_valid.
  int ser_pos = 0, bits_seen = 0, fvalid_cycle = 0;
  logic [FL-1:0] cur;
  always @(posedge clk) begin
    if (reset && fvalid) fvalid_cycle = cycle;
    if (reset && ovalid) begin
      if (ser_pos == 0) begin
        cur = ser_exp.pop_front();
        check(cycle == fvalid_cycle + 1, "serial output starts one clock after frame_valid");
      end
      check(obit == cur[FL-1-ser_pos], "serial bit");
      ser_pos = (ser_pos + 1) % FL;
      bits_seen++;
    end
  end

  function automatic logic [NB-1:0] rand_errors(input int n);
    logic [NB-1:0] e;
    e = '0;
    while ($countones(e) < n) e[$urandom_range(NB - 1)] = 1'b1;
    return e;
  endfunction

  int sent = 0;
  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b1;
    @(posedge clk);
    // 1. error-free, back to back; includes the published frame 1010
    send_frame(4'b1010, '0, 0, 1); sent++;
    for (int i = 0; i < 200; i++) begin send_frame(FL'($urandom), '0, 0, 1); sent++; end
    // 2. one error per frame
    for (int i = 0; i < 400; i++) begin send_frame(FL'($urandom), rand_errors(1), 0, 1); sent++; end
    // 3. two to four errors, gaps
    for (int i = 0; i < 400; i++) begin
      send_frame(FL'($urandom), rand_errors($urandom_range(4, 2)), 1, 0);
      sent++;
      if ($urandom_range(3) == 0) begin valid_in <= 1'b0; @(posedge clk); end
    end
    // 4. the published received word (4 channel errors)
    send_frame(4'b1010, 12'b111101000011 ^ 12'b110001010111, 0, 0); sent++;
    valid_in <= 1'b0;
    repeat (3 * FL + 10) @(posedge clk);
    check(frames_seen == sent, $sformatf("%0d frames out of %0d", frames_seen, sent));
    check(bits_seen == sent * FL, "serial bit count");
    check(unique_seen > 600, "enough frames with a unique ML solution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
