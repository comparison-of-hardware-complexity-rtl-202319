// mgc_cell: one Modified Guild Cell, s = (a + b*c) mod D, built in the way
// chosen by VARIANT (see gf_pkg::mgc_variant_e): as a single function
// (mgc_box), as a multiplier plus adder (mgc_ms) or from bit-level cells
// (mgc_gates). All three compute the same function; they differ only in
// structure. Combinational.
module mgc_cell #(
  parameter int unsigned          D       = 7,
  parameter gf_pkg::mgc_variant_e VARIANT = gf_pkg::MGC_MS,
  localparam int unsigned W = gf_pkg::digit_w(D)
) (
  input  logic [W-1:0] a,   // addend
  input  logic [W-1:0] b,   // multiplier
  input  logic [W-1:0] c,   // multiplicand
  output logic [W-1:0] s
);
  if (VARIANT == gf_pkg::MGC_BOX) begin : g_box
    mgc_box   #(.D(D)) u_mgc (.a, .b, .c, .s);
  end else if (VARIANT == gf_pkg::MGC_GATES) begin : g_gates
    mgc_gates #(.D(D)) u_mgc (.a, .b, .c, .s);
  end else begin : g_ms
    mgc_ms    #(.D(D)) u_mgc (.a, .b, .c, .s);
  end
endmodule
