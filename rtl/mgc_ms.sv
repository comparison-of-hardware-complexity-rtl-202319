// mgc_ms: Modified Guild Cell built from a multiplier and an adder,
// s = (a + b*c) mod D.
//
// Structure as drawn for this variant: a MUL unit forms (b*c) mod D and a
// SUM unit adds the addend a to it modulo D. Combinational, two digit
// operations deep; inputs must be valid digit codes (0..D-1).
module mgc_ms #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,   // addend
  input  logic [W-1:0] b,   // multiplier
  input  logic [W-1:0] c,   // multiplicand
  output logic [W-1:0] s
);
  logic [W-1:0] prod;
  gf_mul #(.D(D)) u_mul (.a(b), .b(c), .s(prod));
  gf_sum #(.D(D)) u_sum (.a(a), .b(prod), .s(s));
endmodule
