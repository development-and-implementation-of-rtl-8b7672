// qam64_mapper: 64-QAM symbol mapper.
//
// Six interleaved bits b[5:0] select one point of the square 8 x 8
// constellation with odd levels -7 .. +7 on each axis. The bit labels follow
// the published binary constellation: b[5:3] counts the in-phase column from
// -7 (000) to +7 (111), and b[2:0] counts the quadrature row from +7 (000)
// down to -7 (111):
//     I = 2*b[5:3] - 7,    Q = 7 - 2*b[2:0].
// The labelling is natural binary, as published, not Gray.
//
// data_out carries the real part in its upper IQ_W bits and the imaginary
// part in its lower IQ_W bits, each two's complement with FRAC fraction bits
// (level 1 = 2**FRAC). The low FRAC bits of each half are therefore always
// zero here; they exist so that the same format can carry noisy received
// values to qam64_demapper. The number format and the one-clock latency are this
// design's choices. reset is active low and synchronous.
module qam64_mapper #(
  parameter int unsigned IQ_W = 16,
  parameter int unsigned FRAC = 8
) (
  input  logic              clk,
  input  logic              reset,               // active low
  input  logic [5:0]        output_interleaver,  // one symbol's bits
  input  logic              valid_in,
  output logic [2*IQ_W-1:0] data_out,            // {I, Q}
  output logic              valid_out
);

  // Odd level 2*idx - 7 in the output fixed-point format.
  function automatic logic signed [IQ_W-1:0] level(input logic [2:0] idx);
    logic signed [IQ_W-1:0] l;
    l = IQ_W'(2 * int'(idx) - 7);
    return l <<< FRAC;
  endfunction

  always_ff @(posedge clk) begin
    if (!reset) begin
      data_out  <= '0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in)
        data_out <= {level(output_interleaver[5:3]), level(~output_interleaver[2:0])};
    end
  end

  initial assert (IQ_W >= FRAC + 4) else $error("IQ_W too small for +-7 with FRAC fraction bits");

endmodule
