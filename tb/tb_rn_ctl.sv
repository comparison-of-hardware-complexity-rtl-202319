// tb_rn_ctl: testbench for the Rn final-correction selector.
// For D in {2, 3, 5, 7, 13}: a negative last remainder must yield the
// addend D (low W bits), a non-negative one the addend 0.
module tb_rn_ctl;
  int checks = 0;
  int failures = 0;
  int done = 0;
  localparam int unsigned NDS = 5;
  localparam int unsigned DS [NDS] = '{2, 3, 5, 7, 13};

  for (genvar g = 0; g < NDS; g++) begin : g_d
    localparam int unsigned D = DS[g];
    localparam int unsigned W = (D <= 2) ? 1 : $clog2(D);
    logic         sign;
    logic [W-1:0] q;
    if (D == 7) begin : g_default
      rn_ctl dut (.sign, .q);
    end else begin : g_param
      rn_ctl #(.D(D)) dut (.sign, .q);
    end
    initial begin
      sign = 1'b1;
      #1;
      checks++;
      if (q !== W'(D)) begin
        failures++;
        $display("FAIL D=%0d sign=1: q=%0d", D, q);
      end
      sign = 1'b0;
      #1;
      checks++;
      if (q !== '0) begin
        failures++;
        $display("FAIL D=%0d sign=0: q=%0d", D, q);
      end
      done++;
    end
  end

  initial begin
    wait (done == NDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
