// tb_count_demo: self-checking test of the count example (state machine plus
// counter block).
//
// After To_and_from the result must be cleared, count up by one per clock and
// stop at 64; a second request restarts it from zero.
`timescale 1ns/1ps
module tb_count_demo;
  logic clk = 0, rst_n = 0, to_and_from = 0;
  logic [7:0] result;
  int checks = 0, failures = 0;

  count_demo dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_once();
    logic [7:0] prev;
    to_and_from <= 1;
    @(posedge clk); #1;
    to_and_from <= 0;
    @(posedge clk); #1;
    check(result == 0, $sformatf("cleared, got %0d", result));
    prev = result;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk); #1;
      check(result == prev || result == prev + 1, "steps by one");
      prev = result;
    end
    check(result == 8'd64, $sformatf("stopped at %0d", result));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk); #1;
    check(result == 0, "idle at zero");
    run_once();
    run_once();
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
