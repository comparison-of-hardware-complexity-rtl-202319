// sn_ctl: Sn, the operation selector of one non-restoring division row.
//
// Non-restoring division subtracts the divisor D while the partial
// remainder is non-negative and adds it back while it is negative. From the
// sign of the previous partial remainder this unit sets sub (1 = subtract)
// and presents the operand for the SMch row: D, or its one's complement
// when subtracting (the row's carry-in is sub, completing the two's
// complement). Operand width is RW = W+2 bits, the signed width of the
// partial remainder. Combinational.
module sn_ctl #(
  parameter int unsigned D = 7,
  localparam int unsigned W  = gf_pkg::digit_w(D),
  localparam int unsigned RW = W + 2
) (
  input  logic          sign,
  output logic          sub,
  output logic [RW-1:0] q
);
  always_comb begin
    sub = ~sign;
    q   = RW'(D) ^ {RW{sub}};
  end
endmodule
