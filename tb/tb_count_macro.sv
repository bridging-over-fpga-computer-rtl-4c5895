// tb_count_macro: self-checking test of the counter block.
//
// Random Count_enable / Load patterns are compared every clock with a
// reference counter (Load low clears, Count_enable low counts, high holds,
// wrap at 2**WIDTH), for the default 8-bit and a 16-bit instance.
`timescale 1ns/1ps
module tb_count_macro;
  logic clk = 0, rst_n = 0, ce = 1, ld = 1;
  logic [7:0]  v8;
  logic [15:0] v16;
  logic [7:0]  r8 = '0;
  logic [15:0] r16 = '0;
  int checks = 0, failures = 0;

  count_macro dut8 (.clk, .rst_n, .count_enable(ce), .load(ld), .value(v8));
  count_macro #(.WIDTH(16)) dut16 (.clk, .rst_n, .count_enable(ce), .load(ld), .value(v16));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!ld)      begin r8 <= '0; r16 <= '0; end
    else if (!ce) begin r8 <= r8 + 1'b1; r16 <= r16 + 1'b1; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Long free run: the 8-bit counter wraps.
    ce <= 0;
    repeat (300) @(posedge clk);
    #1 check(v8 == 8'(300) && v16 == 16'd300, $sformatf("free run %0d %0d", v8, v16));
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(v8 == r8 && v16 == r16, $sformatf("cycle %0d: %0d/%0d vs %0d/%0d", i, v8, v16, r8, r16));
      ce <= ($urandom_range(0, 3) == 0);
      ld <= ($urandom_range(0, 40) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
