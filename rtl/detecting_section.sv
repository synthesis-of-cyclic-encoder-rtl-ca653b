// detecting_section: error-detecting part of the parallel decoder, a cascade
// of N+R iterative cells identical to those of the encoder.
//
// The whole received word enters at once, one bit per cell, first bit sent in
// the first cell; the first cell's input carries are zero. The output carries
// of the last cell are the syndrome s = D^R w(D) mod g(D). It is zero exactly
// when w(D) is a multiple of g(D), i.e. a code word (g(D) has a non-zero
// constant term, so the factor D^R does not change that).
//
// Interface: w[N+R-1:0] received word (w[N+R-1] first bit sent), syndrome
// [R-1:0], error_detected = syndrome non-zero.
// The N+R-cell structure follows the method; error_detected is an extra
// output of this design.
// Timing: purely combinational.
module detecting_section #(
  parameter int unsigned  N = cyclic_code_pkg::HAMMING_N,
  parameter int unsigned  R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G = cyclic_code_pkg::HAMMING_G
) (
  input  logic [N+R-1:0] w,              // received word
  output logic [R-1:0]   syndrome,       // output carries of the last cell
  output logic           error_detected  // word is not a code word
);

  localparam int unsigned L = N + R;

  logic [R-1:0] carry [L+1];

  assign carry[0] = '0;

  for (genvar i = 0; i < L; i++) begin : g_cell
    cyclic_cell #(.R(R), .G(G)) u_cell (
      .x (w[L-1-i]),
      .y (carry[i]),
      .Y (carry[i+1])
    );
  end

  assign syndrome       = carry[L];
  assign error_detected = |syndrome;

endmodule
