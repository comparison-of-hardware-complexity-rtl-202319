// gf_mult: combinational multiplier of GF(D^M) in polynomial basis,
// r = a * b mod P(x), P(x) = x^M + p_{M-1} x^{M-1} + ... + p_0.
//
// The field element is M digits of GF(D) (D prime), coefficient j in bits
// [j*W +: W], W = ceil(log2 D). The polynomial P is an input, so one
// circuit serves any monic P of degree M; it must be irreducible for the
// result to be a field product, but the circuit computes a*b mod P for any
// monic P.
//
// The multiplier is a matrix of Modified Guild Cells (MGC, s = x + y*z mod
// D) and F cells (negation mod D), processing the digits of a from the
// highest one down (Horner's rule):
//   stage 0      : r_j = a_{M-1} * b_j                        (M MGC)
//   stage i >= 1 : t   = r_{M-1}, f = F(t) = -t mod D          (1 F)
//                  u_j = r_{j-1} + a_{M-1-i} * b_j  (r_{-1}=0) (M MGC)
//                  r_j = u_j + f * p_j                          (M MGC)
// The shift r*x pushes t onto x^M; since x^M = -p(x) mod P, adding f*p(x)
// removes it. That gives M*(2M-1) MGC and M-1 F cells: 15 and 2 for
// GF(7^3), the count of the GF(7^3) schematic. Stage 0's addend inputs are
// tied to zero.
//
// VARIANT selects how every MGC is built (gf_pkg::mgc_variant_e). Purely
// combinational: no clock, no reset, result valid one combinational delay
// after the inputs, a path of 2M-1 MGC cells.
module gf_mult #(
  parameter int unsigned          D       = 7,
  parameter int unsigned          M       = 3,
  parameter gf_pkg::mgc_variant_e VARIANT = gf_pkg::MGC_MS,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [M*W-1:0] a,
  input  logic [M*W-1:0] b,
  input  logic [M*W-1:0] p,
  output logic [M*W-1:0] r
);
  // st[i][j]: coefficient j after stage i
  logic [M-1:0][M-1:0][W-1:0] st;

  // stage 0: partial product of the top digit of a
  for (genvar j = 0; j < M; j++) begin : g_s0
    mgc_cell #(.D(D), .VARIANT(VARIANT)) u_pp (
      .a ('0), .b (a[(M-1)*W +: W]), .c (b[j*W +: W]), .s (st[0][j])
    );
  end

  for (genvar i = 1; i < M; i++) begin : g_stage
    logic [W-1:0]          f;
    logic [M-1:0][W-1:0]   u;

    gf_neg #(.D(D)) u_f (.a(st[i-1][M-1]), .b(f));

    for (genvar j = 0; j < M; j++) begin : g_col
      logic [W-1:0] prev;
      if (j == 0) begin : g_lo
        assign prev = '0;
      end else begin : g_hi
        assign prev = st[i-1][j-1];
      end
      mgc_cell #(.D(D), .VARIANT(VARIANT)) u_pp (
        .a (prev), .b (a[(M-1-i)*W +: W]), .c (b[j*W +: W]), .s (u[j])
      );
      mgc_cell #(.D(D), .VARIANT(VARIANT)) u_red (
        .a (u[j]), .b (f), .c (p[j*W +: W]), .s (st[i][j])
      );
    end
  end

  assign r = st[M-1];
endmodule
