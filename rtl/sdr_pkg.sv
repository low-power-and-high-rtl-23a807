// Shared types and constants of the adaptive-modulation receiver datapath and of
// the wave-pipelined multiplier.
//
// Receiver samples, tap weights and errors are two's-complement fractions of
// W = 15 bits (one sign bit, 14 fraction bits, range [-1, 1)). Reduced precision
// keeps the P most significant bits of such a word (the sign bit included); the
// bits below are gated to zero. The multiplier supports P from 9 to 15.
// The four modulation schemes and their word lengths (9, 11, 13, 15 bits) and
// supply voltages (1.35 V to 1.8 V) follow the document; the Q1.14 number
// format and the encodings are this design's own choice.
package sdr_pkg;

  localparam int unsigned W      = 15;   // full word length
  localparam int unsigned P_MIN  = 9;    // smallest supported precision
  localparam int unsigned PREC_W = 4;    // width of a precision code (9..15)

  typedef logic signed [W-1:0] word_t;

  typedef struct packed {
    word_t re;
    word_t im;
  } cplx_t;

  typedef enum logic [1:0] {
    MOD_QPSK   = 2'd0,
    MOD_QAM16  = 2'd1,
    MOD_QAM64  = 2'd2,
    MOD_QAM256 = 2'd3
  } mod_e;

  // Bits per dimension (I or Q) of each scheme: 1, 2, 3, 4.
  function automatic int unsigned bits_per_dim(mod_e m);
    return int'(m) + 1;
  endfunction

  // Keep the p most significant bits of a word, clear the rest.
  function automatic word_t prec_mask(logic [PREC_W-1:0] p);
    word_t m;
    for (int i = 0; i < int'(W); i++) m[i] = (i >= int'(W) - int'(p));
    return m;
  endfunction

  // Stage state of the wave-pipelined 9-bit multiplier's carry-save array.
  localparam int unsigned WM_N = 9;          // operand width
  typedef struct packed {
    logic                 valid;
    logic [WM_N-1:0]      x;
    logic [WM_N-1:0]      y;
    logic [2*WM_N-1:0]    s;   // carry-save sum vector
    logic [2*WM_N-1:0]    c;   // carry-save carry vector
  } wm_state_t;

endpackage
