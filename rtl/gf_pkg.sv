// gf_pkg: types and helpers shared by the GF(D^M) multiplier modules.
//
// A GF(D) digit (D prime) is held as an unsigned binary code of
// digit_w(D) = ceil(log2(D)) bits; only the codes 0..D-1 are used. A field
// element of GF(D^M) in polynomial basis is M such digits packed side by
// side, coefficient j in bits [j*W +: W]. The digit width follows the 3-bit
// buses of the GF(7^3) example; the packing order is this design's choice.
package gf_pkg;

  // How each Modified Guild Cell (MGC) is built.
  //   MGC_BOX   : one Boolean function of the three inputs (unified entity)
  //   MGC_MS    : a digit multiplier followed by a digit adder
  //   MGC_GATES : bit-level multiply-add array plus non-restoring division
  typedef enum logic [1:0] {
    MGC_BOX   = 2'd0,
    MGC_MS    = 2'd1,
    MGC_GATES = 2'd2
  } mgc_variant_e;

  // Bits needed for one GF(D) digit.
  function automatic int unsigned digit_w(input int unsigned d);
    return (d <= 2) ? 1 : $clog2(d);
  endfunction

endpackage
