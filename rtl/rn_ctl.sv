// rn_ctl: Rn, the final-correction selector of non-restoring division.
//
// After the last division row the partial remainder may be negative; the
// true remainder is then that value plus the divisor D. This unit decides
// from the sign of the last remainder whether that extra addition is
// needed and supplies the addend for the correcting adder: D when the
// remainder is negative, otherwise 0. Only the low W bits are produced,
// because the corrected remainder lies in 0..D-1 and the low W bits of a
// sum depend only on the low W bits of its terms. Combinational.
module rn_ctl #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic         sign,
  output logic [W-1:0] q
);
  always_comb q = sign ? W'(D) : '0;
endmodule
