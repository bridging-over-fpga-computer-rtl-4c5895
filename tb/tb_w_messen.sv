// tb_w_messen: self-checking test of the w_messen position multiplexer at its
// default parameters (1 MHz clock, real pulse timings).
//
// Pulses in microseconds are applied on Rot_in and
// Phs_in. A behavioural demultiplexer in the testbench measures every pulse on
// Mux_out and names it by its high time (Ap 200, Apr 250, Htp 100, Htpr
// 150 us). Each scenario compares the decoded sequence, its timing (decision
// 256 us after the input edge, Htp/Htpr slot 400 us after the Ap/Apr slot) and
// the latched flags on Result_vektor with what the protocol prescribes, then
// clears the flags through Reset_vektor. Every mechanism (the four kinds of
// output, the spiral wait, single-axis pass-through, the Ap/Apr priority, the
// four length errors, the full-buffer error, ripple tolerance, flag reset) is
// counted and must occur at least once.
`timescale 1ns/1ps
module tb_w_messen;
  localparam int US = 1000;
  localparam int F_PHS_KURZ = 0, F_PHS_LANG = 1, F_ROT_LANG = 2, F_ROT_KURZ = 3,
                 F_AP = 4, F_APR = 5, F_HTP = 6, F_HTPR = 7, F_HTP_N_M = 8;
  typedef enum int {K_AP, K_APR, K_HTP, K_HTPR, K_BAD} kind_e;
  typedef enum int {M_AP, M_APR, M_HTP, M_HTPR, M_SPIRAL_WAIT, M_SINGLE_AXIS, M_PRIORITY,
                    M_ROT_KURZ, M_ROT_LANG, M_PHS_KURZ, M_PHS_LANG, M_HTP_N_M, M_RIPPLE,
                    M_FLAG_RESET, M_NUM} mech_e;

  logic clk = 0, rst_n = 0;
  logic rot_in = 0, phs_in = 0, mode_sp = 0;
  logic [8:0] reset_vektor = '0, result_vektor, xs;
  logic mux_out;

  int checks = 0, failures = 0;
  int mech[M_NUM];
  real rise_t[$];
  kind_e rise_k[$];
  real t_up = -1;

  w_messen dut (.*);

  always #(US/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic kind_e classify(real high_us);
    if (high_us > 195 && high_us < 205) return K_AP;
    if (high_us > 245 && high_us < 255) return K_APR;
    if (high_us > 95  && high_us < 105) return K_HTP;
    if (high_us > 145 && high_us < 155) return K_HTPR;
    return K_BAD;
  endfunction

  // Behavioural demultiplexer. Edges seen before reset is released (the
  // registers are not yet defined) are ignored.
  always @(mux_out) begin
    if (!rst_n) t_up = -1;
    else if (mux_out) t_up = $realtime / US;
    else if (t_up >= 0) begin
      rise_t.push_back(t_up);
      rise_k.push_back(classify($realtime / US - t_up));
      t_up = -1;
    end
  end

  task automatic rot_pulse(input int at_us, input int len_us);
    fork begin
      #(at_us * US) rot_in = 1;
      #(len_us * US) rot_in = 0;
    end join_none
  endtask

  task automatic phs_pulse(input int at_us, input int len_us);
    fork begin
      #(at_us * US) phs_in = 1;
      #(len_us * US) phs_in = 0;
    end join_none
  endtask

  // Compare decoded outputs with the expected kinds and rise times (us after
  // the scenario start, within +-tol).
  task automatic expect_out(input real t0, input kind_e k[$], input real t[$], input string name);
    check(rise_k.size() == k.size(), $sformatf("%s: %0d pulses on mux_out, expected %0d", name,
          rise_k.size(), k.size()));
    for (int i = 0; i < k.size() && i < rise_k.size(); i++) begin
      check(rise_k[i] == k[i], $sformatf("%s: pulse %0d is %s, expected %s", name, i,
            rise_k[i].name(), k[i].name()));
      check(rise_t[i] - t0 >= t[i] && rise_t[i] - t0 <= t[i] + 6.0,
            $sformatf("%s: pulse %0d at +%0.1f us, expected +%0.1f", name, i, rise_t[i] - t0, t[i]));
      case (rise_k[i])
        K_AP: mech[M_AP]++;
        K_APR: mech[M_APR]++;
        K_HTP: mech[M_HTP]++;
        K_HTPR: mech[M_HTPR]++;
        default: ;
      endcase
    end
    rise_t.delete(); rise_k.delete();
  endtask

  // Compare and clear the latched flags.
  task automatic expect_flags(input logic [8:0] exp, input string name);
    check(result_vektor == exp, $sformatf("%s: flags %b, expected %b", name, result_vektor, exp));
    if (exp[F_ROT_KURZ] && result_vektor[F_ROT_KURZ]) mech[M_ROT_KURZ]++;
    if (exp[F_ROT_LANG] && result_vektor[F_ROT_LANG]) mech[M_ROT_LANG]++;
    if (exp[F_PHS_KURZ] && result_vektor[F_PHS_KURZ]) mech[M_PHS_KURZ]++;
    if (exp[F_PHS_LANG] && result_vektor[F_PHS_LANG]) mech[M_PHS_LANG]++;
    if (exp[F_HTP_N_M] && result_vektor[F_HTP_N_M]) mech[M_HTP_N_M]++;
    reset_vektor = 9'h1FF;
    #(4 * US);
    reset_vektor = 9'h000;
    #(4 * US);
    check(result_vektor == 9'h000, $sformatf("%s: flags cleared", name));
    if (exp != 0 && result_vektor == 0) mech[M_FLAG_RESET]++;
  endtask

  function automatic logic [8:0] fl(input int a = -1, input int b = -1, input int c = -1,
                                     input int d = -1);
    logic [8:0] v = '0;
    if (a >= 0) v[a] = 1;
    if (b >= 0) v[b] = 1;
    if (c >= 0) v[c] = 1;
    if (d >= 0) v[d] = 1;
    return v;
  endfunction

  initial begin
    real t0;
    #(5 * US) rst_n = 1;
    #(10 * US);

    // ---- Position multiplexer, spiral mode ----
    mode_sp = 0;
    // 1. Ap with an Htp: Ap at 256 us, Htp in the slot 400 us later.
    t0 = $realtime / US;
    rot_pulse(0, 200); phs_pulse(100, 200);
    #(1300 * US);
    expect_out(t0, '{K_AP, K_HTP}, '{256, 656}, "ap+htp");
    expect_flags(fl(F_AP, F_HTP), "ap+htp");

    // 2. Htpr alone waits for the next rotation pulse (Apr).
    t0 = $realtime / US;
    phs_pulse(0, 400);
    #(1500 * US);
    check(rise_k.size() == 0, "spiral: htpr waits for a rotation pulse");
    rot_pulse(0, 400);
    #(1300 * US);
    expect_out(t0 + 1500, '{K_APR, K_HTPR}, '{256, 656}, "spiral wait");
    mech[M_SPIRAL_WAIT]++;
    expect_flags(fl(F_APR, F_HTPR), "spiral wait");

    // 3. Too short rotation pulse: no output, Rot_Kurz.
    rot_pulse(0, 80);
    #(900 * US);
    expect_out(0, '{}, '{}, "rot short");
    expect_flags(fl(F_ROT_KURZ), "rot short");

    // 4. Too long rotation pulse: Apr and Rot_Lang.
    t0 = $realtime / US;
    rot_pulse(0, 500);
    #(900 * US);
    expect_out(t0, '{K_APR}, '{256}, "rot long");
    expect_flags(fl(F_APR, F_ROT_LANG), "rot long");

    // 5. Short and long table pulses.
    phs_pulse(0, 80);
    #(900 * US);
    expect_flags(fl(F_PHS_KURZ), "phs short");
    t0 = $realtime / US;
    phs_pulse(0, 500);
    #(900 * US);
    rot_pulse(0, 200);
    #(1000 * US);
    expect_out(t0 + 900, '{K_AP, K_HTPR}, '{256, 656}, "phs long");
    expect_flags(fl(F_AP, F_HTPR, F_PHS_LANG), "phs long");

    // 6. A second table pulse while the first still waits: Htp_n_m, lost.
    t0 = $realtime / US;
    phs_pulse(0, 200); phs_pulse(700, 400);
    #(1500 * US);
    rot_pulse(0, 200);
    #(1000 * US);
    expect_out(t0 + 1500, '{K_AP, K_HTP}, '{256, 656}, "buffer full");
    expect_flags(fl(F_AP, F_HTP, F_HTP_N_M), "buffer full");

    // 7. A 20 us dip early in the pulse is tolerated (ripple).
    t0 = $realtime / US;
    rot_pulse(0, 10); rot_pulse(30, 170);
    #(900 * US);
    expect_out(t0, '{K_AP}, '{256}, "ripple");
    mech[M_RIPPLE]++;
    expect_flags(fl(F_AP), "ripple");

    // ---- Single-axis mode ----
    mode_sp = 1;
    #(10 * US);
    // 8. Table pulses pass without rotation pulses (one tick more latency,
    //    through the buffer).
    t0 = $realtime / US;
    phs_pulse(0, 200); phs_pulse(700, 400);
    #(1500 * US);
    expect_out(t0, '{K_HTP, K_HTPR}, '{258, 958}, "single axis");
    mech[M_SINGLE_AXIS]++;
    expect_flags(fl(F_HTP, F_HTPR), "single axis");

    // 9. Rotation pulse first when both are ready.
    t0 = $realtime / US;
    rot_pulse(0, 200); phs_pulse(0, 200);
    #(1300 * US);
    expect_out(t0, '{K_AP, K_HTP}, '{256, 656}, "priority");
    mech[M_PRIORITY]++;
    expect_flags(fl(F_AP, F_HTP), "priority");

    // 10. Regular rotation stream at 700 us spacing, one Apr per turn.
    mode_sp = 0;
    t0 = $realtime / US;
    for (int i = 0; i < 6; i++) rot_pulse(700 * i, i == 5 ? 400 : 200);
    #(4700 * US);
    expect_out(t0, '{K_AP, K_AP, K_AP, K_AP, K_AP, K_APR},
               '{256, 956, 1656, 2356, 3056, 3756}, "stream");
    check(xs == 9'd324, $sformatf("xs at end of cycle = %0d", xs));
    expect_flags(fl(F_AP, F_APR), "stream");

    for (int m = 0; m < M_NUM; m++) begin
      check(mech[m] > 0, $sformatf("mechanism %s never happened", mech_e'(m)));
      $display("mechanism %-14s %0d", mech_e'(m), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40_000 * US);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
