// tb_gf_sum: exhaustive self-checking testbench for gf_sum, the digit adder: (a + b) mod D.
//
// One instance per field characteristic D in {2, 3, 5, 7, 13} (the
// characteristics of the evaluated fields; D = 7 with the module's default
// parameters). Every combination of valid input digits is applied and the
// output is compared with the value computed by integer arithmetic here.
module tb_gf_sum;
  int checks = 0;
  int failures = 0;
  int done = 0;
  localparam int unsigned NDS = 5;
  localparam int unsigned DS [NDS] = '{2, 3, 5, 7, 13};

  for (genvar g = 0; g < NDS; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
    logic [W-1:0] a, b, s;
    if (D == 7) begin : g_default
      gf_sum dut (.a(a), .b(b), .s(s));
    end else begin : g_param
      gf_sum #(.D(D)) dut (.a(a), .b(b), .s(s));
    end
    initial begin
      for (int unsigned ia = 0; ia < D; ia++) begin
        for (int unsigned ib = 0; ib < D; ib++) begin
          a = W'(ia);
          b = W'(ib);
          #1;
          checks++;
          if (int'(s) != int'((ia + ib) % D)) begin
            failures++;
            $display("FAIL D=%0d a=%0d b=%0d: got %0d expected %0d", D, ia, ib, s, (ia + ib) % D);
          end
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
