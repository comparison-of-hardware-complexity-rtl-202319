// mgc_box: Modified Guild Cell as one unit, s = (a + b*c) mod D.
//
// The MGC is the cell of the multiplier matrix: it multiplies two GF(D)
// digits and adds a third. In this variant the cell is not split into
// parts; its output is one Boolean function of all 3*W input bits, left to
// synthesis to minimise as a whole. Combinational; inputs must be valid
// digit codes (0..D-1).
module mgc_box #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,   // addend
  input  logic [W-1:0] b,   // multiplier
  input  logic [W-1:0] c,   // multiplicand
  output logic [W-1:0] s
);
  logic [2*W:0] t;
  always_comb begin
    t = (2*W+1)'(a) + (2*W+1)'(b) * (2*W+1)'(c);
    s = W'(t % (2*W+1)'(D));
  end
endmodule
