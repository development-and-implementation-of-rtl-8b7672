// qam64_demapper: hard-decision 64-QAM de-mapper, the inverse of
// qam64_mapper.
//
// The received real and imaginary parts (data_in = {I, Q}, two's complement
// with FRAC fraction bits) are each sliced to the nearest odd level
// -7 .. +7: the decision thresholds sit at 0, +-2, +-4 and +-6, and values
// beyond +-8 saturate to the outer level. The level index gives the bits
// back with the mapper's labelling: b[5:3] = (I_level + 7)/2 and
// b[2:0] = (7 - Q_level)/2. One clock of latency; reset is active low and
// synchronous. Only hard decisions are produced, since the decoder is a
// hard-decision decoder. The slicer is this design's own construction; the
// published material gives only the de-mapper's function.
module qam64_demapper #(
  parameter int unsigned IQ_W = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic              clk,
  input  logic              reset,     // active low
  input  logic [2*IQ_W-1:0] data_in,   // {I, Q}
  input  logic              valid_in,
  output logic [5:0]        bits_out,
  output logic              valid_out
);

  // Level index 0..7 of the odd level nearest to v: floor((v + 8) / 2),
  // clamped. Dropping FRAC+1 low bits of (v + 8*2**FRAC) does the floor.
  function automatic logic [2:0] slice(input logic signed [IQ_W-1:0] v);
    logic signed [IQ_W+1:0] shifted;
    logic signed [IQ_W+1:0] idx;
    shifted = (IQ_W+2)'(v) + ((IQ_W+2)'(8) <<< FRAC);
    idx     = shifted >>> (FRAC + 1);
    if (idx < 0)      return 3'd0;
    else if (idx > 7) return 3'd7;
    else              return idx[2:0];
  endfunction

  always_ff @(posedge clk) begin
    if (!reset) begin
      bits_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in)
        bits_out <= {slice(data_in[2*IQ_W-1:IQ_W]), ~slice(data_in[IQ_W-1:0])};
    end
  end

endmodule
