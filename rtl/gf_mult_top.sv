// gf_mult_top: three GF(D^M) multipliers side by side, one for each way of
// building the Modified Guild Cell: index 0 as one unit, index 1 as a
// multiplier plus adder, index 2 from simple bit-level cells. Each has its
// own operand, polynomial and result ports; all three compute
// r[k] = a[k] * b[k] mod (x^M + p[k]). The default field GF(7^3) is the one
// of the worked example. Combinational.
module gf_mult_top #(
  parameter int unsigned D = 7,
  parameter int unsigned M = 3,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [2:0][M*W-1:0] a,
  input  logic [2:0][M*W-1:0] b,
  input  logic [2:0][M*W-1:0] p,
  output logic [2:0][M*W-1:0] r
);
  gf_mult #(.D(D), .M(M), .VARIANT(gf_pkg::MGC_BOX)) u_box (
    .a(a[0]), .b(b[0]), .p(p[0]), .r(r[0]));
  gf_mult #(.D(D), .M(M), .VARIANT(gf_pkg::MGC_MS)) u_ms (
    .a(a[1]), .b(b[1]), .p(p[1]), .r(r[1]));
  gf_mult #(.D(D), .M(M), .VARIANT(gf_pkg::MGC_GATES)) u_gates (
    .a(a[2]), .b(b[2]), .p(p[2]), .r(r[2]));
endmodule
