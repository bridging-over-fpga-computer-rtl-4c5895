// tb_sm_counter: self-checking test of the count/hold/reset counter.
//
// A reference model with the three states (reset, count, hold) is run beside
// the block on random command sequences (long runs of one command are
// likely) and compared every clock; a directed part checks that hold freezes
// the value and count resumes from it.
`timescale 1ns/1ps
module tb_sm_counter;
  import sm_counter_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0] cmd = CMD_RESET;
  logic [15:0] stand;
  int ref_state = 0;          // 0 reset, 1 count, 2 hold
  logic [15:0] ref_stand = '0;
  int checks = 0, failures = 0;

  sm_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    case (ref_state)
      0: begin ref_stand <= 0; if (cmd == CMD_COUNT) ref_state <= 1; end
      1: if (cmd == CMD_COUNT) ref_stand <= ref_stand + 1;
         else if (cmd == CMD_RESET) begin ref_state <= 0; ref_stand <= 0; end
         else ref_state <= 2;
      default: if (cmd == CMD_COUNT) ref_state <= 1;
         else if (cmd == CMD_RESET) begin ref_state <= 0; ref_stand <= 0; end
    endcase
  end

  initial begin
    logic [15:0] held;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    cmd <= CMD_COUNT;
    repeat (11) @(posedge clk); #1;
    check(stand == 10, $sformatf("counted to %0d", stand));
    cmd <= CMD_HOLD;
    repeat (5) @(posedge clk); #1;
    held = stand;
    check(held == 10, $sformatf("held at %0d", held));
    cmd <= CMD_COUNT;
    repeat (4) @(posedge clk); #1;
    check(stand == held + 3, $sformatf("resumed to %0d", stand));
    cmd <= CMD_RESET;
    @(posedge clk); #1;
    check(stand == 0, "reset clears");
    repeat (2) @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(stand == ref_stand, $sformatf("cycle %0d: %0d vs %0d", i, stand, ref_stand));
      if ($urandom_range(0, 9) == 0) cmd <= 2'($urandom_range(0, 3));
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
