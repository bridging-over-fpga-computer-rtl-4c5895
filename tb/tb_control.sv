// tb_control: self-checking test of the control coder.
//
// The tick enable is held high (one clock = one 500 kHz step). The testbench
// models the buffer in front of the coder: a requested Htp/Htpr is held on
// Htp_1/Htpr_1 until the coder pulses Reset_S. A monitor records every pulse
// on Mux_out (start tick, length, which activity output was high) and each
// scenario compares the list with the protocol: Ap 100 ticks high, Apr 125,
// Htp 50, Htpr 75; the Htp/Htpr slot starts 200 ticks (400 us) after the
// Ap/Apr slot; in spiral mode a stored Htp/Htpr waits for an Ap/Apr, in
// single-axis mode it goes out at once.
`timescale 1ns/1ps
module tb_control;
  logic clk = 0, rst_n = 0, tick = 1;
  logic ap = 0, apr = 0, htp_1 = 0, htpr_1 = 0, mode_sp = 0;
  logic mux_out, reset_s, ap_akt, apr_akt, htp_akt, htpr_akt;
  int checks = 0, failures = 0;
  int now = 0;
  int rise_t[$], rise_len[$], rise_kind[$];
  int cur_t = -1, cur_kind = -1, n_reset_s = 0;

  control dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Buffer model and pulse monitor, sampled after each clock edge.
  always @(posedge clk) begin
    #1;
    now++;
    if (reset_s) begin
      htp_1 <= 0; htpr_1 <= 0; n_reset_s++;
    end
    if (mux_out && cur_t < 0) begin
      cur_t = now;
      cur_kind = ap_akt ? 0 : apr_akt ? 1 : htp_akt ? 2 : htpr_akt ? 3 : -1;
      check($countones({ap_akt, apr_akt, htp_akt, htpr_akt}) == 1, "one activity output");
    end else if (!mux_out && cur_t >= 0) begin
      rise_t.push_back(cur_t); rise_len.push_back(now - cur_t); rise_kind.push_back(cur_kind);
      cur_t = -1;
    end
  end

  // One-tick pulse on Ap (which = 0) or Apr (which = 1).
  task automatic pulse_in(input int which);
    if (which == 0) ap <= 1; else apr <= 1;
    @(posedge clk); #2;
    ap <= 0; apr <= 0;
  endtask

  // Compare the recorded pulses with the expected (offset, length, kind) list.
  task automatic expect_pulses(input int t0, input int exp_off[$], input int exp_len[$],
                               input int exp_kind[$], input string name);
    check(rise_t.size() == exp_off.size(), $sformatf("%s: %0d pulses, expected %0d", name,
          rise_t.size(), exp_off.size()));
    for (int i = 0; i < exp_off.size() && i < rise_t.size(); i++) begin
      check(rise_t[i] - t0 == exp_off[i], $sformatf("%s pulse %0d at +%0d, expected +%0d", name, i,
            rise_t[i] - t0, exp_off[i]));
      check(rise_len[i] == exp_len[i], $sformatf("%s pulse %0d length %0d, expected %0d", name, i,
            rise_len[i], exp_len[i]));
      check(rise_kind[i] == exp_kind[i], $sformatf("%s pulse %0d kind %0d, expected %0d", name, i,
            rise_kind[i], exp_kind[i]));
    end
    rise_t.delete(); rise_len.delete(); rise_kind.delete();
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk); #2;
    rst_n <= 1;
    repeat (2) @(posedge clk); #2;

    // 1. Spiral: Ap alone.
    mode_sp <= 0; #2;
    t0 = now; pulse_in(0);
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1}, '{100}, '{0}, "ap alone");

    // 2. Spiral: Ap with a stored Htp.
    t0 = now; htp_1 <= 1; pulse_in(0);
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1, 201}, '{100, 50}, '{0, 2}, "ap+htp");
    check(!htp_1, "buffer released");

    // 3. Spiral: Apr with a stored Htpr.
    t0 = now; htpr_1 <= 1; pulse_in(1);
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1, 201}, '{125, 75}, '{1, 3}, "apr+htpr");

    // 4. Spiral: a stored Htp waits for the next Ap.
    t0 = now; htp_1 <= 1;
    repeat (500) @(posedge clk); #2;
    check(rise_t.size() == 0 && htp_1, "spiral: htp waits");
    t0 = now; pulse_in(0);
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1, 201}, '{100, 50}, '{0, 2}, "spiral wait");

    // 5. Single axis: Htp and Htpr go out without Ap.
    mode_sp <= 1; @(posedge clk); #2;
    t0 = now; htpr_1 <= 1;
    repeat (300) @(posedge clk); #2;
    expect_pulses(t0, '{1}, '{75}, '{3}, "single htpr");
    t0 = now; htp_1 <= 1;
    repeat (300) @(posedge clk); #2;
    expect_pulses(t0, '{1}, '{50}, '{2}, "single htp");

    // 6. Single axis: Ap has priority over a stored Htp.
    t0 = now; htp_1 <= 1; ap <= 1; @(posedge clk); #2; ap <= 0;
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1, 201}, '{100, 50}, '{0, 2}, "priority");

    // 7. An Ap during a busy window is not taken; after the window it is.
    mode_sp <= 0;
    t0 = now; pulse_in(0);
    repeat (50) @(posedge clk); #2;
    pulse_in(1);
    repeat (400) @(posedge clk); #2;
    expect_pulses(t0, '{1}, '{100}, '{0}, "busy");
    check(n_reset_s == 6, $sformatf("reset_s pulses %0d", n_reset_s));

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
