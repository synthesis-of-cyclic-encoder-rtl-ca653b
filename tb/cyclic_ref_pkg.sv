// cyclic_ref_pkg: reference arithmetic for the testbenches of the cyclic
// encoder and decoder, worked out by plain polynomial long division over
// GF(2) rather than by the shift-register recurrence the design uses.
//
// Words are held in a 64-bit vector, bit j being the coefficient of D^j.
// gfull is the full generator polynomial including its leading term, e.g.
// 5'b10011 for g(D) = D^4 + D + 1.
package cyclic_ref_pkg;

  // a(D) mod g(D), where g(D) has degree r.
  function automatic logic [63:0] poly_mod(logic [63:0] a, logic [63:0] gfull,
                                           int unsigned r);
    for (int d = 63; d >= int'(r); d--)
      if (a[d]) a ^= gfull << (d - r);
    return a;
  endfunction

  // Check bits of a systematic cyclic code: D^r x(D) mod g(D).
  function automatic logic [63:0] check_bits(logic [63:0] msg, logic [63:0] gfull,
                                             int unsigned r);
    return poly_mod(msg << r, gfull, r);
  endfunction

endpackage
