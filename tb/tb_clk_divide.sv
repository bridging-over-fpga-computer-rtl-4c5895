// tb_clk_divide: self-checking test of the rate divider.
//
// With the default DIV = 2 the tick must be high on every second clock and
// Mode_Sp must reach mode_sp_q only at ticks. A second instance with DIV = 5
// checks the general case.
`timescale 1ns/1ps
module tb_clk_divide;
  logic clk = 0, rst_n = 0, mode_sp = 0;
  logic tick, mode_sp_q, tick5, mode5;
  int checks = 0, failures = 0;

  clk_divide dut (.clk, .rst_n, .mode_sp, .tick, .mode_sp_q);
  clk_divide #(.DIV(5)) dut5 (.clk, .rst_n, .mode_sp, .tick(tick5), .mode_sp_q(mode5));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int n2 = 0, n5 = 0, last2 = -1, last5 = -1;
    bit prev_q, t;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      prev_q = mode_sp_q;
      t = tick;
      if (tick) begin
        if (last2 >= 0) check(i - last2 == 2, $sformatf("tick spacing %0d", i - last2));
        last2 = i; n2++;
      end
      if (tick5) begin
        if (last5 >= 0) check(i - last5 == 5, $sformatf("tick5 spacing %0d", i - last5));
        last5 = i; n5++;
      end
      mode_sp = 1'($urandom_range(0, 1));
      @(posedge clk); #1;
      if (!t) check(mode_sp_q == prev_q, "mode_sp_q changed without tick");
      else    check(mode_sp_q == mode_sp, "mode_sp_q not sampled at tick");
    end
    check(n2 == 100, $sformatf("%0d ticks in 200 clocks", n2));
    check(n5 == 40, $sformatf("%0d ticks5 in 200 clocks", n5));
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
