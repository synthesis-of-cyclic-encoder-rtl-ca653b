// correction_cell: one iterative cell of the correcting section of the
// decoder.
//
// It stands for one clock pulse of the sequential decoder after the syndrome
// has been formed: the syndrome register is stepped with its serial input held
// at logic zero, and the correcting gate looks at the syndrome to decide
// whether the received bit of this position is wrong. The cell therefore
// holds a cyclic_cell with x tied to 0 (output carries Y = syndrome for the
// next position) and a correcting_gate driven by the input carries y.
//
// Interface: R carries in (y) and out (Y), received bit w, corrected bit c,
// `hit` when c was complemented. G is the generator polynomial as in
// cyclic_cell, PATTERN as in correcting_gate.
// Which carries feed the gate (the cell's input side) is this design's choice;
// it gives the position-i gate the syndrome Y_(n+r+i-1), as the method needs.
// Timing: purely combinational.
module correction_cell #(
  parameter int unsigned  R       = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G       = cyclic_code_pkg::HAMMING_G,
  parameter logic [R-1:0] PATTERN = 4'b1000
) (
  input  logic [R-1:0] y,    // syndrome for this position
  input  logic         w,    // received bit at this position
  output logic [R-1:0] Y,    // syndrome for the next position
  output logic         c,    // corrected bit
  output logic         hit   // this bit was complemented
);

  // Syndrome shift with the serial input held at zero.
  cyclic_cell #(.R(R), .G(G)) u_shift (
    .x (1'b0),
    .y (y),
    .Y (Y)
  );

  correcting_gate #(.R(R), .PATTERN(PATTERN)) u_gate (
    .y   (y),
    .w   (w),
    .c   (c),
    .hit (hit)
  );

endmodule
