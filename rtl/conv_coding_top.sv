// conv_coding_top: the complete convolutional coding system.
//
// Transmitter: information bits (input_data, one per clock with valid_in)
// are encoded by conv_encoder into 3-bit code words, reordered by the 4 x 3
// block_interleaver and mapped by qam64_mapper to 64-QAM symbols on
// tx_data_out ({I, Q}). The channel lies outside this module: its output is
// fed back on rx_data_in / rx_valid. Receiver: qam64_demapper makes hard bit
// decisions, block_deinterleaver restores the code word order and
// viterbi_decoder recovers the information bits, serially on output_data and
// a frame at a time on output_decoded_data.
//
// A frame is FRAME_LEN information bits (12 code bits, two symbols with the
// default 4). Frames may follow each other back to back at one information
// bit per clock. With a channel of zero delay, a decoded frame is on
// output_decoded_data 20 clocks after its first information bit is sampled
// (16 after its last), and its first bit on output_data one clock later. The block
// chain follows the published system diagram; the frame handling and all
// latencies are this design's choices. reset is active low and synchronous.
module conv_coding_top
  import conv_pkg::*;
#(
  parameter int unsigned FRAME_LEN = DEF_FRAME_LEN
) (
  input  logic                 clk,
  input  logic                 reset,              // active low
  input  logic                 input_data,
  input  logic                 valid_in,
  output codeword_t            tx_encoded_data,
  output logic                 tx_encoded_valid,
  output logic [31:0]          tx_data_out,        // {I, Q} to the channel
  output logic                 tx_valid,
  input  logic [31:0]          rx_data_in,         // {I, Q} from the channel
  input  logic                 rx_valid,
  output logic                 output_data,
  output logic                 output_valid,
  output logic [FRAME_LEN-1:0] output_decoded_data,
  output logic                 output_frame_valid
);

  localparam int unsigned ROWS = FRAME_LEN;   // one row per code word
  localparam int unsigned SYM  = 6;           // bits per 64-QAM symbol

  logic [SYM-1:0] il_word;
  logic           il_valid;
  logic [SYM-1:0] dm_bits;
  logic           dm_valid;
  codeword_t      di_row;
  logic           di_valid;

  conv_encoder #(.FRAME_LEN(FRAME_LEN)) u_encoder (
    .clk, .reset, .input_data, .valid_in,
    .encoder_output(tx_encoded_data), .valid_out(tx_encoded_valid),
    .current_state(), .next_state()
  );

  block_interleaver #(.ROWS(ROWS), .COLS(N_OUT), .OUT_W(SYM)) u_interleaver (
    .clk, .reset, .row_in(tx_encoded_data), .valid_in(tx_encoded_valid),
    .output_interleaver(il_word), .valid_out(il_valid),
    .block_out(), .block_valid()
  );

  qam64_mapper #(.IQ_W(16), .FRAC(8)) u_mapper (
    .clk, .reset, .output_interleaver(il_word), .valid_in(il_valid),
    .data_out(tx_data_out), .valid_out(tx_valid)
  );

  qam64_demapper #(.IQ_W(16), .FRAC(8)) u_demapper (
    .clk, .reset, .data_in(rx_data_in), .valid_in(rx_valid),
    .bits_out(dm_bits), .valid_out(dm_valid)
  );

  block_deinterleaver #(.ROWS(ROWS), .COLS(N_OUT), .IN_W(SYM)) u_deinterleaver (
    .clk, .reset, .data_in(dm_bits), .valid_in(dm_valid),
    .row_out(di_row), .valid_out(di_valid)
  );

  viterbi_decoder #(.FRAME_LEN(FRAME_LEN)) u_decoder (
    .clk, .reset, .decoder_input(di_row), .valid_in(di_valid),
    .output_data, .valid_out(output_valid),
    .decoded_frame(output_decoded_data), .frame_valid(output_frame_valid)
  );

endmodule
