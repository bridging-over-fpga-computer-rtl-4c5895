// tb_count_state_m: self-checking test of the counter administration state
// machine, with a behavioural counter in the testbench.
//
// Checks the idle outputs, that To_and_from gives one clock of Load low, that
// the counter then runs (Count_enable low) while its value is below 63, that
// Count_enable returns high when the value reaches 63 and that the machine is
// back in its start state and can be started again.
`timescale 1ns/1ps
module tb_count_state_m;
  logic clk = 0, rst_n = 0, to_and_from = 0;
  logic count_enable, load;
  logic [7:0] value = '0;
  int checks = 0, failures = 0;

  count_state_m dut (.*);

  always #5 clk = ~clk;

  // Behavioural counter.
  always @(posedge clk) begin
    if (!load)              value <= '0;
    else if (!count_enable) value <= value + 1'b1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_once();
    int n_load = 0, n_count = 0, t = 0;
    to_and_from <= 1;
    @(posedge clk); #1;
    to_and_from <= 0;
    check(!load && count_enable, "start: load low, counter held");
    while (t < 200) begin
      if (!load) n_load++;
      if (!count_enable) n_count++;
      @(posedge clk); #1;
      t++;
      if (count_enable && load && value >= 63) break;
    end
    // One clock, or two when the counter still holds 64 from the previous run
    // (the state machine acts only on values up to 63).
    check(n_load >= 1 && n_load <= 2, $sformatf("load low for %0d clocks", n_load));
    check(n_count == 64, $sformatf("counted %0d clocks", n_count));
    check(value == 8'd64, $sformatf("stopped at %0d", value));
    repeat (10) @(posedge clk); #1;
    check(value == 8'd64 && count_enable && load, "stays stopped");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(count_enable && load, "idle outputs after reset");
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
