// smch_cell: SMch, the bit cell of a non-restoring division row.
//
// A full adder on a partial remainder bit r and an operand bit q. The Sn
// unit of the row presents q as the divisor bit when the row adds and as
// its complement when the row subtracts, and feeds the row's carry-in with
// 1 for a subtraction, so a row of these cells adds or subtracts in two's
// complement. Combinational: s + 2*co = r + q + ci.
module smch_cell (
  input  logic r,
  input  logic q,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = r ^ q ^ ci;
    co = (r & q) | (r & ci) | (q & ci);
  end
endmodule
