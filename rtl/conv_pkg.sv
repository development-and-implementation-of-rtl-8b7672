// conv_pkg: constants and helper functions shared by the convolutional
// coding chain.
//
// The code is the rate-1/3, constraint-length-7 non-systematic convolutional
// code with generators g1 = 1111001, g2 = 1011011, g3 = 1110101. Each
// generator is written as a 7-bit mask over the window {x(n), x(n-1), ...,
// x(n-6)}, with the x(n) tap in bit 6. The encoder state is the six previous
// input bits with x(n-1) in bit 5 and x(n-6) in bit 0, so an input bit x moves
// the state s to {x, s[5:1]}. This matches the state numbering of the
// published trellis example (input 1 from state 000000 gives state 100000).
//
// The frame (4 information bits -> 12 code bits -> one 4x3 interleaver
// block -> two 6-bit 64-QAM symbols) is the design's unit of work. Restarting
// each frame from state 000000 is this design's choice.
package conv_pkg;

  localparam int unsigned K          = 7;          // constraint length
  localparam int unsigned MEM        = K - 1;      // shift-register cells
  localparam int unsigned NUM_STATES = 1 << MEM;   // 64 trellis states
  localparam int unsigned N_OUT      = 3;          // code bits per input bit

  localparam logic [K-1:0] G1 = 7'b1111001;
  localparam logic [K-1:0] G2 = 7'b1011011;
  localparam logic [K-1:0] G3 = 7'b1110101;

  localparam int unsigned DEF_FRAME_LEN = 4;       // information bits per frame

  typedef logic [MEM-1:0]   state_t;
  typedef logic [N_OUT-1:0] codeword_t;            // {y1, y2, y3}

  // Code word produced when bit x enters the encoder in state s.
  function automatic codeword_t encode_bit(input state_t s, input logic x);
    logic [K-1:0] w;
    w = {x, s};
    return {^(w & G1), ^(w & G2), ^(w & G3)};
  endfunction

  function automatic state_t state_after(input state_t s, input logic x);
    return {x, s[MEM-1:1]};
  endfunction

  // Number of ones in a code word (hard-decision branch metric).
  function automatic logic [1:0] weight3(input codeword_t c);
    return 2'(c[0]) + 2'(c[1]) + 2'(c[2]);
  endfunction

endpackage
