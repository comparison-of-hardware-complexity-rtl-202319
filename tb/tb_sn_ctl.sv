// tb_sn_ctl: testbench for the Sn operation selector of a division row.
// For D in {2, 3, 5, 7, 13} and both signs: a non-negative remainder must
// select subtraction, with the operand q such that q + 1 = -D in W+2 bits;
// a negative one must select addition with q = D.
module tb_sn_ctl;
  int checks = 0;
  int failures = 0;
  int done = 0;
  localparam int unsigned NDS = 5;
  localparam int unsigned DS [NDS] = '{2, 3, 5, 7, 13};

  for (genvar g = 0; g < NDS; g++) begin : g_d
    localparam int unsigned D  = DS[g];
    localparam int unsigned W  = (D <= 2) ? 1 : $clog2(D);
    localparam int unsigned RW = W + 2;
    logic          sign, sub;
    logic [RW-1:0] q;
    if (D == 7) begin : g_default
      sn_ctl dut (.sign, .sub, .q);
    end else begin : g_param
      sn_ctl #(.D(D)) dut (.sign, .sub, .q);
    end
    initial begin
      sign = 1'b0;
      #1;
      checks++;
      if (sub !== 1'b1 || RW'(q + 1'b1) !== RW'(-int'(D))) begin
        failures++;
        $display("FAIL D=%0d sign=0: sub=%0d q=%b", D, sub, q);
      end
      sign = 1'b1;
      #1;
      checks++;
      if (sub !== 1'b0 || q !== RW'(D)) begin
        failures++;
        $display("FAIL D=%0d sign=1: sub=%0d q=%b", D, sub, q);
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
