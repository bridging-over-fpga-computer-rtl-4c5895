// tb_tony: self-checking test of the tony flag block.
//
// Random message and reset patterns, with the tick enable high on a random
// half of the clocks, are compared every clock with a reference: a flag is
// set by a rising message seen from one tick to the next, cleared by its
// reset bit (reset wins), and kept otherwise. A directed part checks that a
// message that stays high does not set a flag again after it was cleared.
`timescale 1ns/1ps
module tb_tony;
  logic clk = 0, rst_n = 0, tick = 0;
  logic [8:0] msg = '0, reset_vektor = '0, result_vektor;
  logic [8:0] ref_res = '0, ref_prev = '0;
  int checks = 0, failures = 0;

  tony dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n && tick) begin
    ref_res  <= (ref_res | (msg & ~ref_prev)) & ~reset_vektor;
    ref_prev <= msg;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // Directed: stay-high message.
    tick <= 1;
    msg <= 9'h001; @(posedge clk); @(posedge clk); #1;
    check(result_vektor[0], "flag set by rising message");
    reset_vektor <= 9'h001; @(posedge clk); #1;
    check(!result_vektor[0], "flag cleared");
    reset_vektor <= 9'h000;
    repeat (5) @(posedge clk); #1;
    check(!result_vektor[0], "held message does not set again");
    msg <= 9'h000; @(posedge clk);
    msg <= 9'h001; @(posedge clk); @(posedge clk); #1;
    check(result_vektor[0], "new rising edge sets again");
    msg <= 9'h000; reset_vektor <= 9'h1FF; @(posedge clk);
    reset_vektor <= 9'h000; @(posedge clk); #1;
    check(result_vektor == 9'h000, "all cleared");
    // Random.
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(result_vektor == ref_res, $sformatf("cycle %0d: %h vs %h", i, result_vektor, ref_res));
      tick         <= 1'($urandom_range(0, 1));
      msg          <= 9'($urandom);
      reset_vektor <= 9'($urandom) & 9'($urandom) & 9'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
