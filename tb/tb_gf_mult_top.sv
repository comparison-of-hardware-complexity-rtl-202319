// tb_gf_mult_top: end-to-end testbench of gf_mult_top at its default
// parameters, GF(7^3).
//
// 1. Exhaustive: with the irreducible polynomial P(x) = x^3 + 5 (x^3 - 2;
//    2 is not a cube mod 7), every pair of the 343 x 343 operands is fed to
//    all three multipliers and each result is compared with the schoolbook
//    reference. From the table of results it also checks the field
//    property: every non-zero element has exactly one inverse.
// 2. Random: operands and polynomials drawn independently for the three
//    multipliers.
// Mechanisms counted (each must occur): products that needed reduction,
// a non-zero F output in the first reduction stage, and in the gate-level
// cells both outcomes of the final non-restoring correction (extra
// addition needed / not needed), observed on one cell.
module tb_gf_mult_top;
  import gf_ref_pkg::*;

  localparam int unsigned D = 7;
  localparam int unsigned M = 3;
  localparam int unsigned W = 3;
  localparam int unsigned Q = 343;        // D**M
  localparam int NRAND = 3000;

  int checks = 0;
  int failures = 0;
  int n_reduce = 0;
  int n_fnz = 0;
  int n_fix = 0;
  int n_nofix = 0;

  logic [2:0][M*W-1:0] a, b, p, r;
  logic [W-1:0] rn_q;
  logic [W-1:0] f_ms;

  gf_mult_top dut (.a, .b, .p, .r);

  // probes on internal nodes, for coverage only
  assign rn_q = dut.u_gates.g_stage[1].g_col[0].u_red.g_gates.u_mgc.fix_q;
  assign f_ms = dut.u_ms.g_stage[1].f;

  // element index 0..342 <-> packed digits
  function automatic elem_t idx2e(input int unsigned v);
    return elem_t'(v % 7) | (elem_t'(v / 7 % 7) << 3) | (elem_t'(v / 49) << 6);
  endfunction

  int unsigned inv_cnt [Q];

  task automatic apply(input elem_t ea [3], input elem_t eb [3], input elem_t ep [3]);
    elem_t exp;
    for (int k = 0; k < 3; k++) begin
      a[k] = (M*W)'(ea[k]);
      b[k] = (M*W)'(eb[k]);
      p[k] = (M*W)'(ep[k]);
    end
    #1;
    if (needs_reduction(D, M, ea[1], eb[1])) n_reduce++;
    if (f_ms != '0) n_fnz++;
    if (rn_q != '0) n_fix++; else n_nofix++;
    for (int k = 0; k < 3; k++) begin
      exp = mulmod(D, M, ea[k], eb[k], ep[k]);
      checks++;
      if (elem_t'(r[k]) !== exp) begin
        failures++;
        if (failures < 20)
          $display("FAIL variant %0d a=%h b=%h p=%h: got %h expected %h",
                   k, a[k], b[k], p[k], r[k], exp);
      end
    end
  endtask

  initial begin
    elem_t ea [3], eb [3], ep [3];
    elem_t one;
    one = elem_t'(1);
    // 1. exhaustive over the field
    for (int unsigned i = 0; i < Q; i++) inv_cnt[i] = 0;
    for (int unsigned i = 0; i < Q; i++)
      for (int unsigned j = 0; j < Q; j++) begin
        for (int k = 0; k < 3; k++) begin
          ea[k] = idx2e(i);
          eb[k] = idx2e(j);
          ep[k] = elem_t'(5);
        end
        apply(ea, eb, ep);
        if (elem_t'(r[0]) == one && elem_t'(r[1]) == one && elem_t'(r[2]) == one)
          inv_cnt[i]++;
      end
    for (int unsigned i = 1; i < Q; i++) begin
      checks++;
      if (inv_cnt[i] != 1) begin
        failures++;
        $display("FAIL element %0d has %0d inverses", i, inv_cnt[i]);
      end
    end
    // 2. random operands and polynomials
    for (int n = 0; n < NRAND; n++) begin
      for (int k = 0; k < 3; k++) begin
        ea[k] = rand_elem(D, M);
        eb[k] = rand_elem(D, M);
        ep[k] = rand_elem(D, M);
      end
      apply(ea, eb, ep);
    end

    $display("mechanism: reduction needed      = %0d", n_reduce);
    $display("mechanism: F output non-zero     = %0d", n_fnz);
    $display("mechanism: Rn extra addition     = %0d", n_fix);
    $display("mechanism: Rn no extra addition  = %0d", n_nofix);
    if (n_reduce == 0 || n_fnz == 0 || n_fix == 0 || n_nofix == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
