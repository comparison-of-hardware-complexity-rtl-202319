// tb_mgc_box: exhaustive self-checking testbench for mgc_box, the unified Modified Guild Cell: (a + b*c) mod D.
//
// One instance per field characteristic D in {2, 3, 5, 7, 13} (the
// characteristics of the evaluated fields; D = 7 with the module's default
// parameters). Every combination of valid input digits is applied and the
// output is compared with the value computed by integer arithmetic here.
module tb_mgc_box;
  int checks = 0;
  int failures = 0;
  int done = 0;
  localparam int unsigned NDS = 5;
  localparam int unsigned DS [NDS] = '{2, 3, 5, 7, 13};

  for (genvar g = 0; g < NDS; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
    logic [W-1:0] a, b, c, s;
    if (D == 7) begin : g_default
      mgc_box dut (.a(a), .b(b), .c(c), .s(s));
    end else begin : g_param
      mgc_box #(.D(D)) dut (.a(a), .b(b), .c(c), .s(s));
    end
    initial begin
      for (int unsigned ia = 0; ia < D; ia++) begin
        for (int unsigned ib = 0; ib < D; ib++) begin
          for (int unsigned ic = 0; ic < D; ic++) begin
            a = W'(ia);
            b = W'(ib);
            c = W'(ic);
            #1;
            checks++;
            if (int'(s) != int'((ia + ib * ic) % D)) begin
              failures++;
              $display("FAIL D=%0d a=%0d b=%0d c=%0d: got %0d expected %0d", D, ia, ib, ic, s, (ia + ib * ic) % D);
            end
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
