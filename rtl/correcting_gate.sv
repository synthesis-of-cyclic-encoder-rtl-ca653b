// correcting_gate: the correcting network applied to one received bit.
//
// It compares the syndrome presented to it with the one pattern that marks a
// single error in the bit it guards and, on a match, complements that bit.
// In the iterative decoder every bit position sees the syndrome shifted the
// right number of times, so the same pattern serves every position.
//
// Interface: R-bit syndrome y, received bit w, corrected bit c, and a flag
// `hit` telling that this bit was complemented. PATTERN is the matching
// syndrome; for a cyclic code of length N+R and the divider of cyclic_cell it
// equals D^(N+2R-1) mod g(D) = D^(R-1), i.e. only the top carry set.
// The method gives only what the gate does; the compare-and-XOR form and the
// `hit` output are this design's choice.
// Timing: purely combinational (an R-input compare and one XOR).
module correcting_gate #(
  parameter int unsigned  R       = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] PATTERN = 4'b1000
) (
  input  logic [R-1:0] y,    // syndrome as seen by this bit position
  input  logic         w,    // received bit
  output logic         c,    // corrected bit
  output logic         hit   // this bit was complemented
);

  always_comb begin
    hit = (y == PATTERN);
    c   = w ^ hit;
  end

endmodule
