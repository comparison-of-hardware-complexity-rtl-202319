// tb_sum_g: exhaustive testbench for the SUM_G ripple-carry adder at its
// default width (3 bits) and at 5 bits; s must equal (a + b) mod 2^N.
module tb_sum_g;
  int checks = 0;
  int failures = 0;
  int done = 0;

  logic [2:0] a3, b3, s3;
  logic [4:0] a5, b5, s5;
  sum_g          dut3 (.a(a3), .b(b3), .s(s3));
  sum_g #(.N(5)) dut5 (.a(a5), .b(b5), .s(s5));

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i);
        b3 = 3'(j);
        #1;
        checks++;
        if (s3 !== 3'(i + j)) begin
          failures++;
          $display("FAIL N=3 %0d+%0d: got %0d", i, j, s3);
        end
      end
    done++;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = 5'(i);
        b5 = 5'(j);
        #1;
        checks++;
        if (s5 !== 5'(i + j)) begin
          failures++;
          $display("FAIL N=5 %0d+%0d: got %0d", i, j, s5);
        end
      end
    done++;
  end

  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
