// tb_gf_mult: self-checking testbench for the GF(D^M) multiplier matrix.
//
// Instances: the default one (GF(7^3), multiplier-plus-adder cells) and
// several others that cover every cell variant, D = 2 (one-bit digits) and
// D = 13 (codes above D-1 unused). Each gets random operands with a random
// monic polynomial, plus a few structured cases (multiplying by 1 and by
// x, operands 0). Results are compared with the schoolbook reference of
// gf_ref_pkg. Counted per instance: products that needed reduction, which
// must occur.
module tb_gf_mult;
  import gf_ref_pkg::*;
  import gf_pkg::*;

  int checks = 0;
  int failures = 0;
  int done = 0;
  int reductions = 0;

  localparam int NC = 7;
  localparam int unsigned        CD [NC] = '{7, 2, 3, 5, 13, 13, 2};
  localparam int unsigned        CM [NC] = '{3, 5, 4, 3, 3, 2, 8};
  localparam mgc_variant_e       CV [NC] = '{MGC_MS, MGC_BOX, MGC_GATES, MGC_MS,
                                             MGC_BOX, MGC_GATES, MGC_GATES};
  localparam int NVEC = 1500;

  for (genvar g = 0; g < NC; g++) begin : g_c
    localparam int unsigned D = CD[g];
    localparam int unsigned M = CM[g];
    localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
    logic [M*W-1:0] a, b, p, r;
    if (g == 0) begin : g_default
      gf_mult dut (.a, .b, .p, .r);
    end else begin : g_param
      gf_mult #(.D(D), .M(M), .VARIANT(CV[g])) dut (.a, .b, .p, .r);
    end

    task automatic check_one(input elem_t ea, input elem_t eb, input elem_t ep);
      elem_t exp;
      a = (M*W)'(ea);
      b = (M*W)'(eb);
      p = (M*W)'(ep);
      #1;
      exp = mulmod(D, M, ea, eb, ep);
      checks++;
      if (needs_reduction(D, M, ea, eb)) reductions++;
      if (elem_t'(r) !== exp) begin
        failures++;
        $display("FAIL D=%0d M=%0d a=%h b=%h p=%h: got %h expected %h",
                 D, M, a, b, ep, r, exp);
      end
    endtask

    initial begin
      elem_t ea, ep;
      for (int n = 0; n < NVEC; n++)
        check_one(rand_elem(D, M), rand_elem(D, M), rand_elem(D, M));
      for (int n = 0; n < 20; n++) begin
        ea = rand_elem(D, M);
        ep = rand_elem(D, M);
        check_one(ea, elem_t'(1), ep);              // a * 1 = a
        check_one('0, ea, ep);                      // 0 * a = 0
        check_one(ea, elem_t'(1) << W, ep);         // a * x
      end
      done++;
    end
  end

  initial begin
    wait (done == NC);
    $display("mechanism: products needing reduction = %0d", reductions);
    if (reductions == 0) begin
      failures++;
      $display("FAIL: reduction never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
