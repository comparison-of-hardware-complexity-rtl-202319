// mgc_gates: Modified Guild Cell built from simple bit-level cells,
// s = (a + b*c) mod D.
//
// Three stages, all combinational:
//  1. Multiply-add. W rows of W..2W SMn cells (smn_cell) form the 2W-bit
//     integer n = a + b*c. Row i adds b[i]*c shifted left by i to the
//     running sum, which starts as a; carries ripple along each row. The
//     sum never exceeds (D-1) + (D-1)^2 < 2^(2W), so 2W bits hold it.
//  2. Non-restoring division of n by D, one row per dividend bit (2W rows),
//     most significant bit first. Each row shifts the partial remainder
//     left, brings in the next bit of n, and adds or subtracts D through a
//     row of SMch cells (smch_cell); the row's Sn unit (sn_ctl) picks the
//     operation from the sign of the previous remainder. The remainder is
//     kept in RW = W+2 two's-complement bits, enough for [-2D, 2D).
//  3. Correction. Rn (rn_ctl) looks at the sign of the last remainder; if
//     it is negative, SUM_G (sum_g) adds D once more, on the low W bits,
//     which are the result digit.
// Inputs must be valid digit codes (0..D-1). The cell names and roles are
// those of the document's gate-level variant; the row arrangement, the
// remainder width and the use of SUM_G for the correction are this
// design's choices.
module mgc_gates #(
  parameter int unsigned D = 7,
  localparam int unsigned W  = gf_pkg::digit_w(D),
  localparam int unsigned NW = 2 * W,
  localparam int unsigned RW = W + 2
) (
  input  logic [W-1:0] a,   // addend
  input  logic [W-1:0] b,   // multiplier
  input  logic [W-1:0] c,   // multiplicand
  output logic [W-1:0] s
);
  // ---- stage 1: SMn multiply-add array ----
  logic [W:0][NW-1:0]   acc;    // acc[i]: running sum before row i
  logic [W-1:0][NW:0]   mcy;    // ripple carries of each row

  assign acc[0] = NW'(a);

  for (genvar i = 0; i < W; i++) begin : g_mrow
    assign mcy[i][0] = 1'b0;
    for (genvar j = 0; j < NW; j++) begin : g_mcol
      logic y;
      if (j >= i && j - i < W) begin : g_pp
        assign y = c[j-i];
      end else begin : g_nopp
        assign y = 1'b0;
      end
      smn_cell u_smn (
        .x (b[i]), .y (y), .si (acc[i][j]), .ci (mcy[i][j]),
        .s (acc[i+1][j]), .co (mcy[i][j+1])
      );
    end
  end

  // ---- stage 2: non-restoring division rows (SMch + Sn) ----
  logic [NW:0][RW-1:0]   rem;   // rem[k]: partial remainder before row k
  logic [NW-1:0][RW:0]   dcy;   // ripple carries of each row

  assign rem[0] = '0;

  for (genvar k = 0; k < NW; k++) begin : g_drow
    logic [RW-1:0] shifted;
    logic [RW-1:0] q;
    logic          sub;
    assign shifted = {rem[k][RW-2:0], acc[W][NW-1-k]};
    sn_ctl #(.D(D)) u_sn (.sign(rem[k][RW-1]), .sub(sub), .q(q));
    assign dcy[k][0] = sub;
    for (genvar j = 0; j < RW; j++) begin : g_dcol
      smch_cell u_smch (
        .r (shifted[j]), .q (q[j]), .ci (dcy[k][j]),
        .s (rem[k+1][j]), .co (dcy[k][j+1])
      );
    end
  end

  // ---- stage 3: Rn decides on the extra addition, SUM_G performs it ----
  // Only the low W bits of the remainder reach the adder; the bits between
  // them and the sign are not needed once the sign has been looked at.
  logic [W-1:0] fix_q;
  rn_ctl #(.D(D)) u_rn (.sign(rem[NW][RW-1]), .q(fix_q));
  sum_g  #(.N(W)) u_sumg (.a(rem[NW][W-1:0]), .b(fix_q), .s(s));
endmodule
