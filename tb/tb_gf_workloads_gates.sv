// tb_gf_workloads_gates: the evaluated field GF(13^14) (order near 10^15)
// as a gf_mult built from gate-level Modified Guild Cells. It gets
// random operands under a random monic polynomial and is compared with the
// schoolbook reference of gf_ref_pkg; reductions are counted and must
// occur.
module tb_gf_workloads_gates;
  import gf_ref_pkg::*;
  import gf_pkg::*;

  int checks = 0;
  int failures = 0;
  int done = 0;
  int reductions = 0;

  // One field per testbench keeps each simulation model small enough to
  // build; the other fields are in tb_gf_workloads_gates_d2/_d3/_d5/_d7.
  localparam int NF = 1;
  localparam int unsigned FD [NF] = '{13};
  localparam int unsigned FM [NF] = '{14};
  localparam int NVEC = 200;
  localparam int VLO = 2;   // cell variant simulated: MGC_GATES
  localparam int VHI = 2;

  for (genvar f = 0; f < NF; f++) begin : g_f
    for (genvar v = VLO; v <= VHI; v++) begin : g_v
      localparam int unsigned D = FD[f];
      localparam int unsigned M = FM[f];
      localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
      localparam mgc_variant_e VAR = mgc_variant_e'(v);
      logic [M*W-1:0] a, b, p, r;

      gf_mult #(.D(D), .M(M), .VARIANT(VAR)) dut (.a, .b, .p, .r);

      initial begin
        elem_t ea, eb, ep, exp;
        for (int n = 0; n < NVEC; n++) begin
          ea = rand_elem(D, M);
          eb = rand_elem(D, M);
          ep = rand_elem(D, M);
          a = (M*W)'(ea);
          b = (M*W)'(eb);
          p = (M*W)'(ep);
          #1;
          exp = mulmod(D, M, ea, eb, ep);
          checks++;
          if (needs_reduction(D, M, ea, eb)) reductions++;
          if (elem_t'(r) !== exp) begin
            failures++;
            $display("FAIL GF(%0d^%0d) variant %0d: a=%h b=%h p=%h got %h expected %h",
                     D, M, v, a, b, p, r, exp);
          end
        end
        done++;
      end
    end
  end

  initial begin
    wait (done == (VHI - VLO + 1) * NF);
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
