// gf_mul: MUL unit, the multiplier of two GF(D) digits, s = (a * b) mod D.
//
// Purely combinational: the 2W-bit integer product is reduced modulo the
// constant D. Inputs must be valid digit codes (0..D-1). Written
// behaviourally; synthesis turns it into minimised logic for the given D.
module gf_mul #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [2*W-1:0] prod;
  always_comb begin
    prod = (2*W)'(a) * (2*W)'(b);
    s    = W'(prod % (2*W)'(D));
  end
endmodule
