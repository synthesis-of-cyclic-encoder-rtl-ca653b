// cyclic_code_pkg: constants and types shared by the iterative-cell cyclic
// encoder and decoder.
//
// The default code is the systematic Hamming (15,11) cyclic code with
// generator polynomial g(D) = D^4 + D + 1: n = 11 message bits, r = 4 check
// bits, code length n + r = 15. A generator polynomial of degree r is stored
// here as its r low coefficients {g_(r-1), ..., g_1, g_0}; the leading
// coefficient of D^r is always 1 and is left implicit.
//
// Bit numbering used throughout: bit j of a word vector is the coefficient of
// D^j of the word's polynomial. The most significant bit is therefore the first
// bit sent on the line (the first message bit), and the r least significant
// bits of a code word are its check bits.
package cyclic_code_pkg;

  // Hamming (15,11) code, the main configuration of the design.
  localparam int unsigned HAMMING_N = 11;           // message bits
  localparam int unsigned HAMMING_R = 4;            // check bits (carries per cell)
  localparam logic [HAMMING_R-1:0] HAMMING_G = 4'b0011; // g(D) = D^4 + D + 1

  typedef logic [HAMMING_N-1:0]           hamming_msg_t;      // message word
  typedef logic [HAMMING_N+HAMMING_R-1:0] hamming_word_t;     // code word
  typedef logic [HAMMING_R-1:0]           hamming_syndrome_t; // carries / syndrome

  // Result of the parallel Hamming decoder.
  typedef struct packed {
    hamming_msg_t      msg;            // corrected message bits
    hamming_word_t     word;           // corrected code word
    hamming_syndrome_t syndrome;       // syndrome of the received word
    logic              error_detected; // syndrome is non-zero
  } hamming_dec_t;

endpackage
