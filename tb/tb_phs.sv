// tb_phs: self-checking test of the phs decoder.
//
// The tick enable is held high (one clock = one 500 kHz step). Pulses of many
// lengths L (ticks) are applied, some while the buffer flags Htp_1/Htpr_1 are
// high. Expected results follow the specified windows: a drop after 17..63
// ticks is too short; a pulse that is a signal (L >= 64) finding the buffer
// full at 128 us sets Htp_n_m and is discarded; otherwise Htpr if still high
// at 256 us (L >= 129), else Htp, given 128 ticks after the start for one
// tick; still high at 450 us (L >= 227) sets Phs_Lang.
`timescale 1ns/1ps
module tb_phs;
  logic clk = 0, rst_n = 0, tick = 1, phs_in = 0, htp_1 = 0, htpr_1 = 0;
  logic htp, htpr, phs_lang, phs_kurz, htp_n_m;
  int checks = 0, failures = 0;

  phs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pulse(input int L, input bit busy, input bit busy_is_htpr);
    int n_htp = 0, n_htpr = 0, t_first = -1;
    bit exp_kurz, exp_block, exp_htpr, exp_htp, exp_lang;
    exp_kurz  = (L >= 17 && L <= 63);
    exp_block = !exp_kurz && busy;
    exp_htpr  = !exp_kurz && !exp_block && (L >= 129);
    exp_htp   = !exp_kurz && !exp_block && (L < 129);
    exp_lang  = !exp_kurz && (L >= 227);
    htp_1  <= busy && !busy_is_htpr;
    htpr_1 <= busy && busy_is_htpr;
    for (int n = 0; n < 330; n++) begin
      phs_in <= (n < L);
      @(posedge clk); #1;
      if (htp || htpr) begin
        if (t_first < 0) t_first = n;
        if (htp) n_htp++;
        if (htpr) n_htpr++;
      end
      if (exp_block && n == 64) check(htp_n_m, $sformatf("L=%0d htp_n_m at 128 us", L));
      if (exp_block && n == 62) check(!htp_n_m, $sformatf("L=%0d htp_n_m too early", L));
    end
    check(n_htp == (exp_htp ? 1 : 0), $sformatf("L=%0d busy=%0b htp ticks=%0d", L, busy, n_htp));
    check(n_htpr == (exp_htpr ? 1 : 0), $sformatf("L=%0d busy=%0b htpr ticks=%0d", L, busy, n_htpr));
    if (exp_htp || exp_htpr) check(t_first == 128, $sformatf("L=%0d decision at %0d", L, t_first));
    check(phs_lang == exp_lang, $sformatf("L=%0d phs_lang=%0b", L, phs_lang));
    check(phs_kurz == exp_kurz, $sformatf("L=%0d phs_kurz=%0b", L, phs_kurz));
    check(htp_n_m == exp_block, $sformatf("L=%0d busy=%0b htp_n_m=%0b", L, busy, htp_n_m));
    phs_in <= 0; htp_1 <= 0; htpr_1 <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    pulse(20, 0, 0); pulse(63, 0, 0); pulse(64, 0, 0); pulse(100, 0, 0);
    pulse(128, 0, 0); pulse(129, 0, 0); pulse(200, 0, 0); pulse(226, 0, 0);
    pulse(227, 0, 0); pulse(280, 0, 0);
    pulse(100, 1, 0); pulse(200, 1, 1); pulse(40, 1, 0); pulse(250, 1, 0);
    for (int i = 0; i < 8; i++)
      pulse(17 + $urandom_range(0, 300), 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
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
