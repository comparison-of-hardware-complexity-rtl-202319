// tb_gf_neg: exhaustive self-checking testbench for gf_neg, the digit negation F: (-a) mod D.
//
// One instance per field characteristic D in {2, 3, 5, 7, 13} (the
// characteristics of the evaluated fields; D = 7 with the module's default
// parameters). Every combination of valid input digits is applied and the
// output is compared with the value computed by integer arithmetic here.
module tb_gf_neg;
  int checks = 0;
  int failures = 0;
  int done = 0;
  localparam int unsigned NDS = 5;
  localparam int unsigned DS [NDS] = '{2, 3, 5, 7, 13};

  for (genvar g = 0; g < NDS; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
    logic [W-1:0] a, b;
    if (D == 7) begin : g_default
      gf_neg dut (.a(a), .b(b));
    end else begin : g_param
      gf_neg #(.D(D)) dut (.a(a), .b(b));
    end
    initial begin
      for (int unsigned ia = 0; ia < D; ia++) begin
        a = W'(ia);
        #1;
        checks++;
        if (int'(b) != int'((D - ia) % D)) begin
          failures++;
          $display("FAIL D=%0d a=%0d: got %0d expected %0d", D, ia, b, (D - ia) % D);
        end
      end
      done++;
    end
  end

  initial begin
    wait (done == NDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
