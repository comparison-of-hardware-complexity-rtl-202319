// smn_cell: SMn, the bit cell of the multiply-add array.
//
// Adds the partial product bit x AND y to an incoming sum bit and a carry:
// s + 2*co = (x & y) + si + ci. A grid of these cells forms a + b*c as an
// integer inside the gate-level MGC. Combinational.
module smn_cell (
  input  logic x,
  input  logic y,
  input  logic si,
  input  logic ci,
  output logic s,
  output logic co
);
  logic pp;
  always_comb begin
    pp = x & y;
    s  = pp ^ si ^ ci;
    co = (pp & si) | (pp & ci) | (si & ci);
  end
endmodule
