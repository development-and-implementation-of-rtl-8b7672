// viterbi_decoder: pipelined hard-decision Viterbi decoder for the rate-1/3,
// constraint-length-7 code of conv_pkg (64 trellis states).
//
// A frame is FRAME_LEN received code words, one per clock on decoder_input
// ({y1, y2, y3}) while valid_in is high; every frame starts from state
// 000000, as the encoder does, and has no tail. The work is split into
// pipeline stages so that each clock starts a new phase of decoding and a
// new frame can enter while earlier ones are still being traced back:
//
//   ACS[k]    one add-compare-select bank per trellis step k: for each of the
//             64 states, the two predecessor path metrics plus the Hamming
//             distance between the received word and the branch label; the
//             smaller survives and one decision bit records which. ACS[k]
//             works on word k of a frame and keeps its metrics until the next
//             frame's word k, so ACS[k+1] can read them a clock later.
//   BEST1/2   best-state search over the final metrics, 64 -> 8 -> 1,
//             lowest state number on ties. BEST1 also takes a copy of all
//             survivor decisions of the frame, which then travel with it.
//   TB[j]     one traceback step per stage, newest trellis step first: the
//             decoded bit is the newest bit of the state (bit 5) and the
//             decision bit gives the predecessor's oldest bit.
//   OUT       the whole frame is presented on decoded_frame (first bit in the
//             MSB) with frame_valid, and sent bit by bit on output_data over
//             the next FRAME_LEN clocks.
//
// Timing: if the last word of a frame is sampled at clock edge c,
// decoded_frame is valid after edge c+FRAME_LEN+2 and output_data carries
// the first bit after edge c+FRAME_LEN+3. A new frame may start on the clock
// after the last word of the previous one (one code word per clock).
// Ties between predecessors keep the one whose oldest bit is 0.
//
// The pipelined organisation, hard decisions and the K=7 rate-1/3 trellis
// follow the published design; the stage split, the frame framing with
// zero start state and no tail, the tie rules and the valid strobes are this
// design's choices. reset is active low and synchronous.
module viterbi_decoder
  import conv_pkg::*;
#(
  parameter int unsigned FRAME_LEN = DEF_FRAME_LEN,
  parameter int unsigned METRIC_W  = $clog2(6 * FRAME_LEN + 2)
) (
  input  logic                 clk,
  input  logic                 reset,          // active low
  input  codeword_t            decoder_input,  // {y1, y2, y3}
  input  logic                 valid_in,
  output logic                 output_data,
  output logic                 valid_out,
  output logic [FRAME_LEN-1:0] decoded_frame,  // first decoded bit in MSB
  output logic                 frame_valid
);

  typedef logic [METRIC_W-1:0]   metric_t;
  typedef logic [NUM_STATES-1:0] dec_t;
  typedef logic [$clog2(NUM_STATES/8)-1:0] grp_idx_t;

  localparam int unsigned STEP_W = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1;
  // Start metric of the states a frame cannot start from; larger than any
  // metric a path from state 0 can collect.
  localparam metric_t UNREACHED = metric_t'(3 * FRAME_LEN + 1);

  // ------------------------------------------------------------------
  // Trellis step counter: which ACS bank takes the current word.
  // ------------------------------------------------------------------
  logic [STEP_W-1:0] step_q;
  wire last_step = (step_q == STEP_W'(FRAME_LEN - 1));

  always_ff @(posedge clk) begin
    if (!reset)         step_q <= '0;
    else if (valid_in)  step_q <= last_step ? '0 : step_q + 1'b1;
  end

  // ------------------------------------------------------------------
  // ACS banks. pm_w[k] are the metrics before step k, pm_w[FRAME_LEN] the
  // final ones; dec_w[k] the decisions of step k.
  // ------------------------------------------------------------------
  metric_t pm_w  [FRAME_LEN+1][NUM_STATES];
  dec_t    dec_w [FRAME_LEN];

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_init
    assign pm_w[0][s] = (s == 0) ? '0 : UNREACHED;
  end

  for (genvar k = 0; k < FRAME_LEN; k++) begin : g_acs
    metric_t pm_q  [NUM_STATES];
    dec_t    dec_q;
    metric_t pm_d  [NUM_STATES];
    dec_t    dec_d;

    always_comb begin
      for (int ns = 0; ns < NUM_STATES; ns++) begin
        state_t  nst, p0, p1;
        metric_t c0, c1;
        nst = state_t'(ns);
        p0  = {nst[MEM-2:0], 1'b0};
        p1  = {nst[MEM-2:0], 1'b1};
        c0  = pm_w[k][p0] + metric_t'(weight3(decoder_input ^ encode_bit(p0, nst[MEM-1])));
        c1  = pm_w[k][p1] + metric_t'(weight3(decoder_input ^ encode_bit(p1, nst[MEM-1])));
        dec_d[ns] = (c1 < c0);
        pm_d[ns]  = (c1 < c0) ? c1 : c0;
      end
    end

    always_ff @(posedge clk) begin
      if (valid_in && step_q == STEP_W'(k)) begin
        pm_q  <= pm_d;
        dec_q <= dec_d;
      end
    end

    assign pm_w[k+1] = pm_q;
    assign dec_w[k]  = dec_q;
  end

  // Marks the clock after the last word of a frame entered ACS.
  logic acs_done_q;
  always_ff @(posedge clk) begin
    if (!reset) acs_done_q <= 1'b0;
    else        acs_done_q <= valid_in && last_step;
  end

  // ------------------------------------------------------------------
  // BEST1: minimum of each group of 8 states; freeze the decisions.
  // ------------------------------------------------------------------
  metric_t  b1_metric_d [8];
  grp_idx_t b1_index_d  [8];
  always_comb begin
    for (int g = 0; g < 8; g++) begin
      b1_metric_d[g] = pm_w[FRAME_LEN][g*8];
      b1_index_d[g]  = '0;
      for (int i = 1; i < 8; i++) begin
        if (pm_w[FRAME_LEN][g*8+i] < b1_metric_d[g]) begin
          b1_metric_d[g] = pm_w[FRAME_LEN][g*8+i];
          b1_index_d[g]  = grp_idx_t'(i);
        end
      end
    end
  end

  logic     b1_valid_q;
  metric_t  b1_metric_q [8];
  grp_idx_t b1_index_q  [8];
  dec_t     b1_dec_q    [FRAME_LEN];

  always_ff @(posedge clk) begin
    if (!reset) b1_valid_q <= 1'b0;
    else        b1_valid_q <= acs_done_q;
    if (acs_done_q) begin
      b1_metric_q <= b1_metric_d;
      b1_index_q  <= b1_index_d;
      b1_dec_q    <= dec_w;
    end
  end

  // ------------------------------------------------------------------
  // BEST2: minimum of the 8 group winners.
  // ------------------------------------------------------------------
  state_t best_d;
  always_comb begin
    metric_t m;
    m      = b1_metric_q[0];
    best_d = {3'd0, b1_index_q[0]};
    for (int g = 1; g < 8; g++) begin
      if (b1_metric_q[g] < m) begin
        m      = b1_metric_q[g];
        best_d = {3'(g), b1_index_q[g]};
      end
    end
  end

  // ------------------------------------------------------------------
  // Traceback pipeline: tb_*[0] is the BEST2 register, tb_*[j+1] the
  // register after traceback step j (trellis step FRAME_LEN-1-j).
  // ------------------------------------------------------------------
  logic                 tb_valid [FRAME_LEN+1];
  state_t               tb_state [FRAME_LEN+1];
  logic [FRAME_LEN-1:0] tb_bits  [FRAME_LEN+1];
  dec_t                 tb_dec   [FRAME_LEN+1][FRAME_LEN];

  always_ff @(posedge clk) begin
    if (!reset) tb_valid[0] <= 1'b0;
    else        tb_valid[0] <= b1_valid_q;
    if (b1_valid_q) begin
      tb_state[0] <= best_d;
      tb_bits[0]  <= '0;
      tb_dec[0]   <= b1_dec_q;
    end
  end

  for (genvar j = 0; j < FRAME_LEN; j++) begin : g_tb
    localparam int unsigned STEP = FRAME_LEN - 1 - j;
    always_ff @(posedge clk) begin
      if (!reset) tb_valid[j+1] <= 1'b0;
      else        tb_valid[j+1] <= tb_valid[j];
      if (tb_valid[j]) begin
        tb_state[j+1]                 <= {tb_state[j][MEM-2:0], tb_dec[j][STEP][tb_state[j]]};
        tb_bits[j+1]                  <= tb_bits[j];
        tb_bits[j+1][FRAME_LEN-1-STEP] <= tb_state[j][MEM-1];
        tb_dec[j+1]                   <= tb_dec[j];
      end
    end
  end

  // ------------------------------------------------------------------
  // Output: parallel frame and serial bits.
  // ------------------------------------------------------------------
  localparam int unsigned CNT_W = $clog2(FRAME_LEN + 1);
  logic [FRAME_LEN-1:0] ser_q;
  logic [CNT_W-1:0]     ser_cnt_q;

  assign decoded_frame = tb_bits[FRAME_LEN];
  assign frame_valid   = tb_valid[FRAME_LEN];

  always_ff @(posedge clk) begin
    if (!reset) begin
      ser_q       <= '0;
      ser_cnt_q   <= '0;
      output_data <= 1'b0;
      valid_out   <= 1'b0;
    end else if (frame_valid) begin
      output_data <= decoded_frame[FRAME_LEN-1];
      ser_q       <= decoded_frame << 1;
      ser_cnt_q   <= CNT_W'(FRAME_LEN - 1);
      valid_out   <= 1'b1;
    end else if (ser_cnt_q != '0) begin
      output_data <= ser_q[FRAME_LEN-1];
      ser_q       <= ser_q << 1;
      ser_cnt_q   <= ser_cnt_q - 1'b1;
      valid_out   <= 1'b1;
    end else begin
      valid_out   <= 1'b0;
    end
  end

  // Frames are at least FRAME_LEN clocks apart, so the serialiser is free.
  a_serialiser_free: assert property (@(posedge clk) disable iff (!reset)
    frame_valid |-> ser_cnt_q == '0);

  initial assert (FRAME_LEN >= 1 && (6 * FRAME_LEN + 1) < (1 << METRIC_W))
    else $error("METRIC_W too small for FRAME_LEN");

endmodule
