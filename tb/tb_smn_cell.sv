// tb_smn_cell: exhaustive testbench for the SMn multiply-add bit cell.
// All 16 input combinations; s + 2*co must equal (x & y) + si + ci.
module tb_smn_cell;
  int checks = 0;
  int failures = 0;
  logic x, y, si, ci, s, co;

  smn_cell dut (.x, .y, .si, .ci, .s, .co);

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, y, si, ci} = 4'(v);
      #1;
      checks++;
      if (int'({co, s}) != int'(x && y) + int'(si) + int'(ci)) begin
        failures++;
        $display("FAIL x=%0d y=%0d si=%0d ci=%0d: got co=%0d s=%0d", x, y, si, ci, co, s);
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
