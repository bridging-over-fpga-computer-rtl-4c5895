// tb_rot: self-checking test of the rot decoder.
//
// The tick enable is held high, so every clock is one 500 kHz step. Pulses of
// many lengths L (in ticks) are applied; the expected outcome is worked out
// from the specified windows: a drop after 17..63 ticks is too short, a pulse
// still high at 256 us (L >= 129) is Apr, otherwise Ap, and one still high at
// 450 us (L >= 227) is also too long. The test also checks when Ap/Apr
// appear (128 ticks after the start, for one tick), the XS value at the end
// of the cycle and that the decoder accepts a new pulse 326 ticks after the
// previous one started.
`timescale 1ns/1ps
module tb_rot;
  logic clk = 0, rst_n = 0, tick = 1, rot_in = 0;
  logic ap, apr, rot_lang, rot_kurz;
  logic [8:0] xs;
  int checks = 0, failures = 0;

  rot dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Apply one pulse of L ticks and observe a whole 650 us cycle.
  task automatic pulse(input int L);
    int n_ap = 0, n_apr = 0, t_first = -1;
    bit exp_kurz, exp_apr, exp_ap, exp_lang;
    exp_kurz = (L >= 17 && L <= 63);
    exp_apr  = !exp_kurz && (L >= 129);
    exp_ap   = !exp_kurz && !exp_apr;
    exp_lang = !exp_kurz && (L >= 227);
    for (int n = 0; n < 330; n++) begin
      rot_in <= (n < L);
      @(posedge clk); #1;
      if (ap || apr) begin
        if (t_first < 0) t_first = n;
        if (ap) n_ap++;
        if (apr) n_apr++;
      end
      if (exp_kurz && n == L) check(rot_kurz, $sformatf("L=%0d rot_kurz after drop", L));
      if (!exp_kurz && n == 324) check(xs == 9'd324, $sformatf("L=%0d xs=%0d at end", L, xs));
      if (n == 329) rot_in <= 0;
    end
    check(n_ap == (exp_ap ? 1 : 0), $sformatf("L=%0d ap ticks=%0d", L, n_ap));
    check(n_apr == (exp_apr ? 1 : 0), $sformatf("L=%0d apr ticks=%0d", L, n_apr));
    if (!exp_kurz) check(t_first == 128, $sformatf("L=%0d decision at tick %0d", L, t_first));
    check(rot_lang == exp_lang, $sformatf("L=%0d rot_lang=%0b", L, rot_lang));
    check(rot_kurz == exp_kurz, $sformatf("L=%0d rot_kurz=%0b", L, rot_kurz));
    rot_in <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    pulse(17); pulse(40); pulse(63); pulse(64); pulse(100); pulse(128);
    pulse(129); pulse(150); pulse(200); pulse(226); pulse(227); pulse(300);
    for (int i = 0; i < 8; i++) pulse(17 + $urandom_range(0, 300));
    // Back-to-back: a new pulse is taken at the tick after the cycle ends.
    begin
      int seen = 0;
      for (int n = 0; n < 326 + 140; n++) begin
        rot_in <= (n < 100) || (n >= 326 && n < 326 + 100);
        @(posedge clk); #1;
        if (ap) seen++;
      end
      check(seen == 2, $sformatf("back-to-back pulses gave %0d Ap", seen));
      rot_in <= 0;
      repeat (400) @(posedge clk);
    end
    // The tick enable gates every step.
    tick <= 0;
    rot_in <= 1;
    repeat (300) @(posedge clk); #1;
    check(!ap && !apr, "no decision without ticks");
    tick <= 1; rot_in <= 0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
