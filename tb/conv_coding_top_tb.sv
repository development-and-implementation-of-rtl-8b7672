// conv_coding_top_tb: end-to-end test of the whole coding system at its
// default size (4-bit frames).
//
// The channel is modelled here: the transmitted {I, Q} symbols come back on
// rx_data_in in the same clock, either unchanged or with noise added to I and
// Q (a sum of uniform variates, roughly Gaussian, made odd). For every frame the test
// works out on its own what the receiver should see: it slices the noisy
// I/Q to the nearest constellation point by comparing distances to all 64
// points, undoes the 4 x 3 interleaving and decodes the 12 bits by
// exhaustive maximum-likelihood search over the 16 possible frames.
//
// Checks:
//   * the published example: input 1010 gives code words 111 101 000 011
//     and the symbols (+5, +3) and (-1, -3), and is received as 1010;
//   * noiseless frames, back to back and with gaps, come back unchanged;
//   * noisy frames decode to a maximum-likelihood frame (and to the sent
//     frame when the channel flipped at most one code bit);
//   * latency: a frame is on output_decoded_data 20 clocks after its first
//     bit, and on output_data from 21 clocks after it.
// Mechanisms counted, each must occur: frames entering the system while two
// or more earlier frames are still inside it (pipelining); code words of a
// new block entering the interleaver while the previous block still leaves
// (ping-pong buffering); channel bit errors
// corrected by the decoder; symbol errors whose bits the interleaver spread
// over several code words; gaps in the input.
module conv_coding_top_tb;
  import conv_pkg::codeword_t;

  localparam int FL = 4;
  localparam int NB = 3 * FL;
  localparam int LATENCY = 20;

  logic clk = 0, reset = 0, input_data = 0, valid_in = 0;
  codeword_t tx_cw;
  logic tx_cw_valid, tx_valid, obit, ovalid, fvalid;
  logic [31:0] tx_data, rx_data;
  logic [FL-1:0] oframe;
  int checks = 0, failures = 0;

  conv_coding_top dut (
    .clk, .reset, .input_data, .valid_in,
    .tx_encoded_data(tx_cw), .tx_encoded_valid(tx_cw_valid),
    .tx_data_out(tx_data), .tx_valid,
    .rx_data_in(rx_data), .rx_valid(tx_valid),
    .output_data(obit), .output_valid(ovalid),
    .output_decoded_data(oframe), .output_frame_valid(fvalid));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cycle = 0;
  always @(negedge clk) cycle++;

  // ---------------- channel model ----------------
  int noise_amp = 0;   // 0: ideal channel
  int noise_i, noise_q;
  always @(negedge clk) begin
    noise_i = 0;
    noise_q = 0;
    for (int k = 0; k < 4; k++) begin
      noise_i += $urandom_range(2 * noise_amp) - noise_amp;
      noise_q += $urandom_range(2 * noise_amp) - noise_amp;
    end
    // odd noise never lands exactly on a decision threshold (an even
    // multiple of 256), where the choice between two points is arbitrary
    if (noise_amp != 0) begin
      noise_i |= 1;
      noise_q |= 1;
    end
  end
  assign rx_data = {16'($signed(tx_data[31:16]) + noise_i), 16'($signed(tx_data[15:0]) + noise_q)};

  // ---------------- reference models ----------------
  function automatic logic [NB-1:0] ref_encode(input logic [FL-1:0] f);
    logic [6:0] h;
    logic [NB-1:0] o;
    h = '0;
    for (int n = 0; n < FL; n++) begin
      h = {h[5:0], f[FL-1-n]};
      o[NB-1-3*n]   = h[0]^h[1]^h[2]^h[3]^h[6];
      o[NB-1-3*n-1] = h[0]^h[2]^h[3]^h[5]^h[6];
      o[NB-1-3*n-2] = h[0]^h[1]^h[2]^h[4]^h[6];
    end
    return o;
  endfunction

  // Nearest constellation point by full search; label from the printed
  // constellation (column from the left, row from the top).
  function automatic logic [5:0] nearest_label(input int i_val, input int q_val);
    longint best;
    logic [5:0] lab;
    best = -1;
    lab = '0;
    for (int col = 0; col < 8; col++)
      for (int row = 0; row < 8; row++) begin
        longint di, dq, d;
        di = longint'(i_val) - (2 * col - 7) * 256;
        dq = longint'(q_val) - (7 - 2 * row) * 256;
        d = di * di + dq * dq;
        if (best < 0 || d < best) begin best = d; lab = {3'(col), 3'(row)}; end
      end
    return lab;
  endfunction

  // Received hard bits of a frame in interleaved (column) order, rebuilt into
  // code word order: stream bit k is column k/4, row k%4.
  function automatic logic [NB-1:0] deinterleave(input logic [NB-1:0] stream);
    logic [NB-1:0] cw;
    for (int k = 0; k < NB; k++) cw[NB-1-(3 * (k % FL) + k / FL)] = stream[NB-1-k];
    return cw;
  endfunction

  // ---------------- stimulus bookkeeping ----------------
  typedef struct { logic [FL-1:0] bits; int first_cycle; } frame_t;
  frame_t sent_q[$];
  logic [NB-1:0] rx_stream_q[$];
  logic [NB-1:0] cur_stream;
  int sym_in_frame = 0;

  // capture what the receiver is given, symbol by symbol
  int symbol_errors = 0, spread_frames = 0;
  logic [NB-1:0] tx_stream;
  always @(posedge clk) begin
    if (reset && tx_valid) begin
      logic [5:0] tx_lab, rx_lab;
      tx_lab = nearest_label(int'($signed(tx_data[31:16])), int'($signed(tx_data[15:0])));
      rx_lab = nearest_label(int'($signed(rx_data[31:16])), int'($signed(rx_data[15:0])));
      if (tx_lab != rx_lab) symbol_errors++;
      cur_stream[NB-1-6*sym_in_frame -: 6] = rx_lab;
      tx_stream[NB-1-6*sym_in_frame -: 6]  = tx_lab;
      sym_in_frame++;
      if (sym_in_frame == NB / 6) begin
        logic [NB-1:0] e;
        int words_hit;
        rx_stream_q.push_back(cur_stream);
        // does a symbol's error land in more than one code word?
        e = deinterleave(cur_stream ^ tx_stream);
        words_hit = 0;
        for (int w = 0; w < FL; w++) if (e[NB-1-3*w -: 3] != 0) words_hit++;
        if (words_hit > 1 && $countones(cur_stream ^ tx_stream) > 1) spread_frames++;
        sym_in_frame = 0;
      end
    end
  end

  // ---------------- output monitor ----------------
  int frames_out = 0, corrected = 0, exact_needed = 0, overlap = 0, pingpong = 0, gaps = 0;
  logic [FL-1:0] ser_q[$];
  always @(posedge clk) begin
    if (reset && fvalid) begin
      frame_t s;
      logic [NB-1:0] rx_cw;
      int dmin, dgot, nerr;
      s = sent_q.pop_front();
      rx_cw = deinterleave(rx_stream_q.pop_front());
      dmin = NB + 1;
      for (int c = 0; c < (1 << FL); c++)
        if ($countones(ref_encode(FL'(c)) ^ rx_cw) < dmin) dmin = $countones(ref_encode(FL'(c)) ^ rx_cw);
      dgot = $countones(ref_encode(oframe) ^ rx_cw);
      nerr = $countones(ref_encode(s.bits) ^ rx_cw);
      check(dgot == dmin, $sformatf("frame %b: decoded %b is not a maximum-likelihood frame", s.bits, oframe));
      if (nerr <= 1) begin
        check(oframe == s.bits, $sformatf("frame %b decoded as %b with %0d channel errors", s.bits, oframe, nerr));
        exact_needed++;
      end
      if (nerr > 0 && oframe == s.bits) corrected++;
      // frame_valid is registered LATENCY edges after the first bit; seen one edge later
      check(cycle == s.first_cycle + LATENCY + 1,
            $sformatf("frame out at %0d, first bit at %0d", cycle, s.first_cycle));
      ser_q.push_back(oframe);
      frames_out++;
    end
    // a code word of one frame enters the interleaver in the same clock as a
    // symbol of an earlier frame leaves the mapper
    if (reset && tx_cw_valid && tx_valid) pingpong++;
  end

  // Pipelining: a frame's first bit enters before the previous frame is out.
  int frames_in = 0;
  always @(posedge clk) begin
    if (reset && valid_in) begin
      if (frames_in % FL == 0 && frames_in / FL > frames_out + (fvalid ? 1 : 0) + 1) overlap++;
      frames_in++;
    end
  end

  int ser_pos = 0, ser_bits = 0;
  logic [FL-1:0] ser_cur;
  always @(posedge clk) begin
    if (reset && ovalid) begin
      if (ser_pos == 0) ser_cur = ser_q.pop_front();
      check(obit == ser_cur[FL-1-ser_pos], "serial output bit");
      ser_pos = (ser_pos + 1) % FL;
      ser_bits++;
    end
  end

  // published example: code words and symbols of input 1010
  codeword_t ex_cw[$];
  logic [31:0] ex_sym[$];
  always @(posedge clk) begin
    if (reset && tx_cw_valid && ex_cw.size() < FL) ex_cw.push_back(tx_cw);
    if (reset && tx_valid && ex_sym.size() < 2) ex_sym.push_back(tx_data);
  end

  task automatic send_frame(input logic [FL-1:0] f, input bit with_gaps);
    frame_t s;
    s.bits = f;
    for (int n = 0; n < FL; n++) begin
      input_data <= f[FL-1-n];
      valid_in   <= 1'b1;
      @(posedge clk);
      if (n == 0) s.first_cycle = cycle;
    end
    sent_q.push_back(s);
    if (with_gaps && $urandom_range(1) == 0) begin
      valid_in <= 1'b0;
      gaps++;
      repeat ($urandom_range(5, 1)) @(posedge clk);
    end
  endtask

  int nframes = 0;
  initial begin
    repeat (3) @(posedge clk);
    reset <= 1'b1;
    @(posedge clk);
    send_frame(4'b1010, 0); nframes++;
    valid_in <= 1'b0;
    repeat (30) @(posedge clk);
    check(ex_cw.size() == 4 && ex_cw[0] == 3'b111 && ex_cw[1] == 3'b101 && ex_cw[2] == 3'b000
          && ex_cw[3] == 3'b011, "example code words 111 101 000 011");
    check(ex_sym.size() == 2 && ex_sym[0] == {16'(5 * 256), 16'(3 * 256)}
          && ex_sym[1] == {16'(-256), 16'(-3 * 256)}, "example symbols (+5,+3), (-1,-3)");
    check(frames_out == 1, "example frame received");
    // ideal channel, back to back, then with gaps
    for (int i = 0; i < 300; i++) begin send_frame(FL'($urandom), i >= 150); nframes++; end
    // noisy channel: noise of up to about +-4*noise_amp on each axis
    noise_amp = 100;
    for (int i = 0; i < 1500; i++) begin send_frame(FL'($urandom), i % 3 == 0); nframes++; end
    noise_amp = 0;
    valid_in <= 1'b0;
    repeat (40) @(posedge clk);
    check(frames_out == nframes, $sformatf("%0d frames out of %0d", frames_out, nframes));
    check(ser_bits == nframes * FL, "serial bit count");
    $display("frames=%0d symbol_errors=%0d corrected=%0d spread=%0d overlap=%0d pingpong=%0d gaps=%0d exact=%0d",
             frames_out, symbol_errors, corrected, spread_frames, overlap, pingpong, gaps, exact_needed);
    check(overlap > 0, "decoder pipeline overlap happened");
    check(pingpong > 0, "interleaver ping-pong happened");
    check(corrected > 0, "channel errors were corrected");
    check(spread_frames > 0, "a symbol error was spread over several code words");
    check(gaps > 0, "input gaps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
