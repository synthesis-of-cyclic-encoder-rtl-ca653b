// parallel_encoder: combinational systematic cyclic encoder built as a cascade
// of N identical iterative cells.
//
// The serial encoder divides D^R x(D) by g(D) in a feedback shift register,
// one message bit per clock. Here the register is unrolled: cell i takes
// message bit i (first bit sent = cell 1) together with the output carries of
// cell i-1, and the first cell's input carries are zero, as the register is
// cleared before a word. The output carries of cell N are the remainder
// r(D) = D^R x(D) mod g(D), the check bits, which are appended after the
// message to form the code word u(D) = D^R x(D) + r(D).
//
// Interface: msg[N-1:0] (msg[N-1] is the first message bit, the coefficient of
// D^(N-1)); word[N+R-1:0] = {msg, check}; check[R-1:0] with check[k] the
// coefficient of D^k of r(D). Defaults: Hamming (15,11), g(D) = D^4 + D + 1.
// The cell count and structure follow the method; the bit numbering and the
// `word` output are this design's choice.
// Timing: purely combinational, no clock; the longest path runs through the
// feedback XOR of every cell.
module parallel_encoder #(
  parameter int unsigned  N = cyclic_code_pkg::HAMMING_N,
  parameter int unsigned  R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G = cyclic_code_pkg::HAMMING_G
) (
  input  logic [N-1:0]   msg,    // message word
  output logic [R-1:0]   check,  // check bits (output carries of cell N)
  output logic [N+R-1:0] word    // systematic code word
);

  // carry[i] are the input carries of cell i+1; carry[N] leaves the last cell.
  logic [R-1:0] carry [N+1];

  assign carry[0] = '0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    // Cell i+1 receives the (i+1)-th message bit sent, msg[N-1-i].
    cyclic_cell #(.R(R), .G(G)) u_cell (
      .x (msg[N-1-i]),
      .y (carry[i]),
      .Y (carry[i+1])
    );
  end

  assign check = carry[N];
  assign word  = {msg, check};

endmodule
