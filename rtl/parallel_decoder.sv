// parallel_decoder: combinational single-error-correcting decoder for a
// systematic cyclic code, 2(N+R)-1 iterative cells in all.
//
// The received word is fed in parallel to a detecting section of N+R cells
// (the same cells as the encoder), whose last output carries are the
// syndrome. The syndrome then runs through a correcting section of N+R-1
// zero-input cells, each guarding one received bit with a correcting gate,
// plus a last gate. If exactly one bit is wrong it is complemented; a zero
// syndrome leaves the word untouched. Two or more errors are flagged by a
// non-zero syndrome but may be miscorrected, as in any Hamming decoder.
//
// Interface: w[N+R-1:0] received word (w[N+R-1] first bit sent, low R bits
// the check bits); corrected word c, message part msg = c[N+R-1:R], syndrome,
// error_detected (syndrome non-zero), corrected (one bit was complemented).
// The 2(N+R)-1-cell structure follows the method; the msg, error_detected
// and corrected outputs are this design's additions.
// Timing: purely combinational, no clock; the outputs settle one path delay
// after the last input bit is applied.
module parallel_decoder #(
  parameter int unsigned  N = cyclic_code_pkg::HAMMING_N,
  parameter int unsigned  R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G = cyclic_code_pkg::HAMMING_G
) (
  input  logic [N+R-1:0] w,               // received word
  output logic [N+R-1:0] c,               // corrected word
  output logic [N-1:0]   msg,             // corrected message bits
  output logic [R-1:0]   syndrome,        // syndrome of w
  output logic           error_detected,  // w is not a code word
  output logic           corrected        // a bit of w was complemented
);

  logic [N+R-1:0] flips;

  detecting_section #(.N(N), .R(R), .G(G)) u_detect (
    .w              (w),
    .syndrome       (syndrome),
    .error_detected (error_detected)
  );

  correcting_section #(.N(N), .R(R), .G(G)) u_correct (
    .syndrome (syndrome),
    .w        (w),
    .c        (c),
    .flips    (flips)
  );

  assign msg       = c[N+R-1:R];
  assign corrected = |flips;

endmodule
