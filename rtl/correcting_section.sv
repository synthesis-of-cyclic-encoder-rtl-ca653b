// correcting_section: single-error correcting part of the parallel decoder.
//
// In the sequential decoder the syndrome is shifted once per clock with a zero
// serial input while the stored word leaves the buffer, and a gate complements
// the outgoing bit when the syndrome shows one particular pattern. Unrolled in
// space, position i (i = 1 .. N+R, first bit sent = 1) sees the syndrome
// after i-1 zero-input shifts. A single error at that position leaves the
// same syndrome there whatever i is, so one pattern serves every gate.
//
// Structure: N+R-1 correction cells in cascade (zero-input shift plus gate,
// the gate of cell i looking at the carries that enter it) and one lone
// correcting gate for the last position, fed by the carries leaving the last
// cell. The pattern is computed at elaboration as D^(N+2R-1) mod g(D): the
// syndrome of an error in the first bit (D^(R+N+R-1)) after zero shifts. For a
// cyclic code of length N+R this reduces to D^(R-1).
//
// Interface: syndrome[R-1:0] from the detecting section, w[N+R-1:0] received
// word, c[N+R-1:0] corrected word, flips[N+R-1:0] marks complemented bits
// (same bit numbering as w).
// The cell counts follow the method; the gate placement and the derivation
// of the pattern from G are this design's own.
// Timing: purely combinational.
module correcting_section #(
  parameter int unsigned  N = cyclic_code_pkg::HAMMING_N,
  parameter int unsigned  R = cyclic_code_pkg::HAMMING_R,
  parameter logic [R-1:0] G = cyclic_code_pkg::HAMMING_G
) (
  input  logic [R-1:0]   syndrome,  // syndrome of the whole received word
  input  logic [N+R-1:0] w,         // received word
  output logic [N+R-1:0] c,         // corrected word
  output logic [N+R-1:0] flips      // bits that were complemented
);

  localparam int unsigned L = N + R;

  // D^e mod g(D), computed by repeated multiplication by D.
  function automatic logic [R-1:0] d_pow_mod_g(int unsigned e);
    logic [R-1:0] rem;
    rem = R'(1);
    for (int unsigned k = 0; k < e; k++)
      rem = {rem[R-2:0], 1'b0} ^ (rem[R-1] ? G : '0);
    return rem;
  endfunction

  localparam logic [R-1:0] PATTERN = d_pow_mod_g(L + R - 1);

  // carry[i] is the syndrome seen by position i+1.
  logic [R-1:0] carry [L];

  assign carry[0] = syndrome;

  for (genvar i = 0; i < L - 1; i++) begin : g_cell
    correction_cell #(.R(R), .G(G), .PATTERN(PATTERN)) u_cell (
      .y   (carry[i]),
      .w   (w[L-1-i]),
      .Y   (carry[i+1]),
      .c   (c[L-1-i]),
      .hit (flips[L-1-i])
    );
  end

  // Last position: no further shift is needed, only the gate.
  correcting_gate #(.R(R), .PATTERN(PATTERN)) u_last_gate (
    .y   (carry[L-1]),
    .w   (w[0]),
    .c   (c[0]),
    .hit (flips[0])
  );

endmodule
