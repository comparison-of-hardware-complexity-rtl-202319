// tb_smch_cell: exhaustive testbench for the SMch division bit cell.
// All 8 input combinations; s + 2*co must equal r + q + ci.
module tb_smch_cell;
  int checks = 0;
  int failures = 0;
  logic r, q, ci, s, co;

  smch_cell dut (.r, .q, .ci, .s, .co);

  initial begin
    for (int v = 0; v < 8; v++) begin
      {r, q, ci} = 3'(v);
      #1;
      checks++;
      if (int'({co, s}) != int'(r) + int'(q) + int'(ci)) begin
        failures++;
        $display("FAIL r=%0d q=%0d ci=%0d: got co=%0d s=%0d", r, q, ci, co, s);
      end
    end
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
