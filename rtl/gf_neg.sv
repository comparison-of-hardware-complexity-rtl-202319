// gf_neg: F unit, the additive inverse of a GF(D) digit, b = (-a) mod D.
//
// In the multiplier the coefficient pushed past x^(M-1) by a shift is
// negated here; multiplying the low part p(x) of the monic field polynomial
// by this digit and adding it back performs the reduction, because
// x^M = -p(x) mod P(x). Combinational: 0 maps to 0, any other digit g to
// D - g. Input must be a valid digit code.
module gf_neg #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] b
);
  always_comb b = (a == '0) ? '0 : W'(D) - a;
endmodule
