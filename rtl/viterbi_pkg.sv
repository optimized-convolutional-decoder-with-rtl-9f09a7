// viterbi_pkg: constants shared by the rate-1/3 convolutional codec.
//
// The code is the one of the encoder in this design: one input bit, three
// coded bits S2 S1 S0, four shift-register flip-flops M3..M0 (16 trellis
// states). A generator word has one bit per tap: bit CODE_M is the serial
// input S_in, bit i (i < CODE_M) is flip-flop Mi. Coded bit j of a symbol is
// the XOR of the taps set in CODE_GEN[j]:
//   S2 = S_in ^ M3 ^ M2 ^ M1 ^ M0   -> 5'b11111
//   S1 = S_in ^ M3 ^ M1 ^ M0        -> 5'b11011
//   S0 = S_in ^ M2 ^ M0             -> 5'b10101
// New input bits enter M3 and shift towards M0, so the state word is
// {M3, M2, M1, M0} and the next state is {S_in, M3, M2, M1}.
// The frame length (DATA_BITS) and the interleaver shape are this design's
// own choices; the code itself follows the encoder equations.
package viterbi_pkg;
  localparam int unsigned CODE_N = 3;  // coded bits per input bit (rate 1/3)
  localparam int unsigned CODE_M = 4;  // encoder flip-flops
  localparam logic [CODE_N-1:0][CODE_M:0] CODE_GEN = {5'b11111, 5'b11011, 5'b10101};
  localparam int unsigned DATA_BITS = 16;  // data bits per frame
  localparam int unsigned FRAME_SYMS = DATA_BITS + CODE_M;  // with the zero tail
  localparam int unsigned ILV_ROWS = 4;   // interleaver rows
  localparam int unsigned ILV_COLS = 15;  // interleaver columns (ROWS*COLS = CODE_N*FRAME_SYMS)
endpackage
