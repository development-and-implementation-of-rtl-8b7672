// conv_encoder: rate-1/3, constraint-length-7 non-systematic convolutional
// encoder.
//
// A six-cell shift register holds the last six input bits; three modulo-2
// sums over the register and the new bit give y1, y2 and y3 with the
// generators 1111001, 1011011 and 1110101 (see conv_pkg). One information
// bit is accepted per clock when valid_in is high; the code word
// encoder_output = {y1, y2, y3} appears on the next clock with valid_out,
// together with the state it was produced from (current_state) and the state
// the register moved to (next_state).
//
// reset is active low and synchronous: while it is 0 the register holds
// 000000 and nothing is emitted, as in the published encoder simulation.
// The register also returns to 000000 after every FRAME_LEN bits so that
// each frame starts from the known state the decoder assumes; that frame
// restart and the valid strobes are this design's choices.
module conv_encoder
  import conv_pkg::*;
#(
  parameter int unsigned FRAME_LEN = DEF_FRAME_LEN
) (
  input  logic      clk,
  input  logic      reset,           // active low
  input  logic      input_data,
  input  logic      valid_in,
  output codeword_t encoder_output,  // {y1, y2, y3}
  output logic      valid_out,
  output state_t    current_state,
  output state_t    next_state
);

  localparam int unsigned CNT_W = (FRAME_LEN > 1) ? $clog2(FRAME_LEN) : 1;

  state_t           state_q;
  logic [CNT_W-1:0] bit_cnt_q;

  always_ff @(posedge clk) begin
    if (!reset) begin
      state_q        <= '0;
      bit_cnt_q      <= '0;
      encoder_output <= '0;
      valid_out      <= 1'b0;
      current_state  <= '0;
      next_state     <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        encoder_output <= encode_bit(state_q, input_data);
        current_state  <= state_q;
        next_state     <= state_after(state_q, input_data);
        if (bit_cnt_q == CNT_W'(FRAME_LEN - 1)) begin
          bit_cnt_q <= '0;
          state_q   <= '0;
        end else begin
          bit_cnt_q <= bit_cnt_q + 1'b1;
          state_q   <= state_after(state_q, input_data);
        end
      end
    end
  end

endmodule
