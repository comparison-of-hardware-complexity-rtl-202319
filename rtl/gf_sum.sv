// gf_sum: SUM unit, the adder of two GF(D) digits, s = (a + b) mod D.
//
// Purely combinational. The binary sum of two digits is below 2*D, so one
// conditional subtraction of D reduces it. Inputs must be valid digit codes
// (0..D-1); other codes give an unspecified digit. Written behaviourally:
// synthesis derives and minimises the Boolean functions of the output bits
// from this description, as a truth-table generator would.
module gf_sum #(
  parameter int unsigned D = 7,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:0] t;
  always_comb begin
    t = {1'b0, a} + {1'b0, b};
    if (t >= (W+1)'(D)) t = t - (W+1)'(D);
    s = t[W-1:0];
  end
endmodule
