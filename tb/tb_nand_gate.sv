// tb_nand_gate: exhaustive test of the two-input NAND gate.
//
// All four input combinations are applied several times in random order. Each
// output is compared with the truth table (low only for a = b = 1) after a
// short settling delay. A watchdog ends the run if it hangs.
`timescale 1ns/1ps
module tb_nand_gate;
  logic a = 0, b = 0, y;
  int checks = 0, failures = 0;

  nand_gate dut (.a, .b, .y);

  initial begin
    logic [1:0] v;
    for (int i = 0; i < 64; i++) begin
      v = (i < 4) ? 2'(i) : 2'($urandom_range(3));
      {a, b} = v;
      #1;
      checks++;
      if (y !== !(v == 2'b11)) begin
        failures++;
        $display("FAIL: a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
