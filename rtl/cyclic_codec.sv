// cyclic_codec: top level holding the parallel (iterative-cell) encoder of the
// transmitter and the parallel decoder of the receiver of a cyclic-coded link.
//
// The two ends of a link do not share signals, so they stand side by side
// with their own ports: the encoder turns a message word into a systematic
// code word, and the decoder turns a received (possibly corrupted) word into
// the corrected word and message. Both are built from the same iterative cell,
// the clock steps of the serial shift-register divider laid out in space, so
// neither holds a flip-flop and a whole word is handled in one pass through
// the logic. Defaults give the Hamming (15,11) code with g(D) = D^4 + D + 1.
//
// Interface: tx_msg -> tx_word (and its check bits tx_check); rx_word ->
// rx_corrected, rx_msg, rx_syndrome, rx_error (word was not a code word),
// rx_fixed (one bit was complemented). Bit N+R-1 of a word is the first bit
// on the line.
// Keeping the two halves unconnected and the port names are this design's
// choices.
// Timing: purely combinational, zero clock cycles of latency.
module cyclic_codec #(
  parameter int unsigned  N = cyclic_code_pkg::HAMMING_N,
  parameter int unsigned  R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G = cyclic_code_pkg::HAMMING_G
) (
  // transmitter
  input  logic [N-1:0]   tx_msg,
  output logic [R-1:0]   tx_check,
  output logic [N+R-1:0] tx_word,
  // receiver
  input  logic [N+R-1:0] rx_word,
  output logic [N+R-1:0] rx_corrected,
  output logic [N-1:0]   rx_msg,
  output logic [R-1:0]   rx_syndrome,
  output logic           rx_error,
  output logic           rx_fixed
);

  parallel_encoder #(.N(N), .R(R), .G(G)) u_encoder (
    .msg   (tx_msg),
    .check (tx_check),
    .word  (tx_word)
  );

  parallel_decoder #(.N(N), .R(R), .G(G)) u_decoder (
    .w              (rx_word),
    .c              (rx_corrected),
    .msg            (rx_msg),
    .syndrome       (rx_syndrome),
    .error_detected (rx_error),
    .corrected      (rx_fixed)
  );

endmodule
