// Shared constants and types of the stochastic LDPC decoder.
//
// HAMMING_H is the parity-check matrix of the (7,4) Hamming code the decoder
// is built for by default (row i lists the bits checked by parity node i,
// column 0 first). LDPC16_H is the ring-structured irregular (16,8) code of
// the first stochastic decoder prototype; it can be given to the same
// parameterized factor graph instead. CNT_W is the width of every cycle
// counter and up/down counter, and dec_state_e the states of the decode
// sequencer.
package stoch_pkg;

  localparam int HAM_N = 7;
  localparam int HAM_M = 3;
  localparam bit [0:HAM_M-1][0:HAM_N-1] HAMMING_H = {
    7'b1100101,
    7'b0111001,
    7'b0010111
  };

  localparam int LDPC16_N = 16;
  localparam int LDPC16_M = 8;
  localparam bit [0:LDPC16_M-1][0:LDPC16_N-1] LDPC16_H = {
    16'b1100000000000001,
    16'b0111000000000000,
    16'b0001110000000000,
    16'b0000011100000000,
    16'b0000000111000000,
    16'b0000000001110000,
    16'b0000000000011100,
    16'b0000000000000111
  };

  localparam int CNT_W = 24;
  typedef logic [CNT_W-1:0] cnt_t;

  typedef enum logic [2:0] {
    S_IDLE,
    S_SCALE,
    S_LOAD,
    S_FILL,
    S_BCAST,
    S_RUN,
    S_DONE
  } dec_state_e;

endpackage
