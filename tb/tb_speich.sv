// tb_speich: self-checking test of the speich buffer.
//
// Checks that a one-tick Htp or Htpr is held on Htp_1 / Htpr_1 until Reset_S,
// that the flag drops one tick after Reset_S, that a long Htp input is not
// stored twice, that nothing is stored without ticks and that a second pulse
// arriving while the buffer is full is not taken.
`timescale 1ns/1ps
module tb_speich;
  logic clk = 0, rst_n = 0, tick = 1, htp = 0, htpr = 0, reset_s = 0;
  logic htp_1, htpr_1;
  int checks = 0, failures = 0;

  speich dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic step(input bit h, input bit hr, input bit r);
    htp <= h; htpr <= hr; reset_s <= r;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    step(0, 0, 0);
    check(!htp_1 && !htpr_1, "empty after reset");
    // Htp stored and held.
    step(1, 0, 0);
    check(htp_1 && !htpr_1, "htp stored");
    for (int i = 0; i < 20; i++) step(0, 0, 0);
    check(htp_1, "htp held");
    // A second pulse while full is not taken.
    step(0, 1, 0);
    check(htp_1 && !htpr_1, "htpr ignored while full");
    step(0, 0, 1);
    check(!htp_1 && !htpr_1, "htp released by reset_s");
    step(0, 0, 0);
    check(!htp_1 && !htpr_1, "back to empty");
    // Htpr.
    step(0, 1, 0);
    check(htpr_1 && !htp_1, "htpr stored");
    step(0, 0, 0);
    step(0, 0, 1);
    check(!htpr_1, "htpr released");
    // A long Htp input is stored only once.
    step(0, 0, 0);
    step(1, 0, 0);
    check(htp_1, "long htp stored");
    step(1, 0, 1);
    check(!htp_1, "released");
    for (int i = 0; i < 5; i++) begin
      step(1, 0, 0);
      check(!htp_1, "long htp not stored twice");
    end
    step(0, 0, 0);
    step(1, 0, 0);
    check(htp_1, "new htp after the input went low");
    step(0, 0, 1);
    step(0, 0, 0);
    // No ticks, no step.
    tick <= 0;
    step(1, 0, 0);
    step(0, 0, 0);
    check(!htp_1, "no store without tick");
    tick <= 1;
    step(0, 0, 0);
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
