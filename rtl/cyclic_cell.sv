// cyclic_cell: one iterative cell of the encoder and of the detecting section
// of the decoder.
//
// The cell is one clock step of the classical linear-feedback division shift
// register, unrolled in space: the r input carries y are the register contents
// before the step, x is the bit entering, and the r output carries Y are the
// register contents after the step. With the feedback f = x ^ y[r-1], the cell
// computes
//     Y[k] = (g_k & f) ^ y[k-1]     (k = 0 .. r-1, y[-1] taken as 0),
// which is the transition rule of the sequential divider. For the default
// Hamming (15,11) generator D^4 + D + 1 this is Y0 = y3 ^ x, Y1 = y0 ^ Y0,
// Y2 = y1, Y3 = y2.
//
// Interface: R carries in (y) and out (Y), one data bit x; parameter G holds
// the low R coefficients of the generator polynomial.
// The transition rule and the Hamming cell follow the iterative-cell method;
// making the polynomial a parameter is this design's generalisation.
// Timing: purely combinational, one level of XOR on the longest path.
module cyclic_cell #(
  parameter int unsigned    R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0]   G = cyclic_code_pkg::HAMMING_G
) (
  input  logic         x,   // bit entering the cell
  input  logic [R-1:0] y,   // input carries (register state before the step)
  output logic [R-1:0] Y    // output carries (register state after the step)
);

  logic fb;

  always_comb begin
    fb   = x ^ y[R-1];
    Y[0] = G[0] & fb;
    for (int unsigned k = 1; k < R; k++)
      Y[k] = (G[k] & fb) ^ y[k-1];
  end

endmodule
