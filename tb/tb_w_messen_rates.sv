// tb_w_messen_rates: long-run rate test of the w_messen position multiplexer
// at its default parameters (1 MHz clock, real microsecond timings).
//
// Where tb_w_messen walks through single scenarios, this testbench feeds
// long pulse trains at the rates the protocol specifies and checks that
// nothing is lost, invented or misplaced:
//   A. spiral mode: gantry pulses every 700..1300 us (random), every eighth
//      one an Apr; pulse lengths spread over the +-50 us tolerance (Ap
//      150..250 us, Apr 350..440 us); table pulses at random moments about one
//      per ten gantry pulses, every fourth one an Htpr;
//   B. spiral mode: table pulses at half the gantry rate (one per two
//      gantry pulses), with the gantry period fixed at 700 us and at 1300 us;
//   C. single-axis mode: only table pulses every 700 us (topogram), then
//      only gantry pulses every 700 us (tomogram).
// A behavioural demultiplexer names every Mux_out pulse by its high time.
// Gantry outputs must appear in input order, 256..264 us after their input
// edge; table outputs must appear in input order, in spiral mode exactly
// 400 us after the gantry output that carries them, in single-axis mode
// 256..266 us after their input edge. No error flag may be raised; the four
// activity flags must be. Each phase ends with the flags cleared.
`timescale 1ns/1ps
module tb_w_messen_rates;
  localparam int US = 1000;
  typedef enum int {K_AP, K_APR, K_HTP, K_HTPR, K_BAD} kind_e;

  logic clk = 0, rst_n = 0;
  logic rot_in = 0, phs_in = 0, mode_sp = 0;
  logic [8:0] reset_vektor = '0, result_vektor, xs;
  logic mux_out;

  int checks = 0, failures = 0;
  int n_out[5];

  // Output pulses seen on Mux_out.
  real   out_t[$];
  kind_e out_k[$];
  real   t_up = -1;
  // Input pulses applied.
  real   g_t[$], p_t[$];
  kind_e g_k[$], p_k[$];

  w_messen dut (.*);

  always #(US/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic kind_e classify(real high_us);
    if (high_us > 195 && high_us < 205) return K_AP;
    if (high_us > 245 && high_us < 255) return K_APR;
    if (high_us > 95  && high_us < 105) return K_HTP;
    if (high_us > 145 && high_us < 155) return K_HTPR;
    return K_BAD;
  endfunction

  function automatic real now_us();
    return $realtime / US;
  endfunction

  // Behavioural demultiplexer; edges before reset release are ignored.
  always @(mux_out) begin
    if (!rst_n) t_up = -1;
    else if (mux_out) t_up = now_us();
    else if (t_up >= 0) begin
      out_t.push_back(t_up);
      out_k.push_back(classify(now_us() - t_up));
      t_up = -1;
    end
  end

  task automatic wait_us(input int us);
    repeat (us) #(US);
  endtask

  // One gantry pulse, then idle up to the end of its period.
  task automatic gantry(input kind_e k, input int len_us, input int period_us);
    g_t.push_back(now_us());
    g_k.push_back(k);
    rot_in = 1;
    wait_us(len_us);
    rot_in = 0;
    wait_us(period_us - len_us);
  endtask

  task automatic table_pulse(input kind_e k, input int len_us);
    p_t.push_back(now_us());
    p_k.push_back(k);
    phs_in = 1;
    wait_us(len_us);
    phs_in = 0;
  endtask

  function automatic int ap_len(input kind_e k);
    return (k == K_AP || k == K_HTP) ? 150 + int'($urandom_range(100))
                                     : 350 + int'($urandom_range(90));
  endfunction

  // Compare what came out with what went in, then clear everything.
  task automatic compare(input string name, input bit spiral);
    int gi = 0, pi = 0;
    real last_g = -1.0e9;
    wait_us(2000);
    for (int i = 0; i < out_k.size(); i++) begin
      n_out[out_k[i]]++;
      if (out_k[i] == K_AP || out_k[i] == K_APR) begin
        if (gi < g_k.size()) begin
          check(out_k[i] == g_k[gi], $sformatf("%s: gantry output %0d is %s, expected %s", name,
                gi, out_k[i].name(), g_k[gi].name()));
          check(out_t[i] - g_t[gi] >= 256 && out_t[i] - g_t[gi] <= 264,
                $sformatf("%s: gantry output %0d at +%0.1f us", name, gi, out_t[i] - g_t[gi]));
        end
        gi++;
        last_g = out_t[i];
      end else if (out_k[i] == K_HTP || out_k[i] == K_HTPR) begin
        if (pi < p_k.size()) begin
          check(out_k[i] == p_k[pi], $sformatf("%s: table output %0d is %s, expected %s", name,
                pi, out_k[i].name(), p_k[pi].name()));
          check(out_t[i] - p_t[pi] >= 256, $sformatf("%s: table output %0d before its decision",
                name, pi));
          if (spiral)
            check(out_t[i] - last_g > 399 && out_t[i] - last_g < 401,
                  $sformatf("%s: table output %0d at +%0.1f us after its gantry output", name, pi,
                            out_t[i] - last_g));
          else
            check(out_t[i] - p_t[pi] <= 266,
                  $sformatf("%s: table output %0d at +%0.1f us", name, pi, out_t[i] - p_t[pi]));
        end
        pi++;
      end else begin
        check(0, $sformatf("%s: unknown pulse on mux_out", name));
      end
    end
    check(gi == g_k.size(), $sformatf("%s: %0d gantry outputs for %0d inputs", name, gi, g_k.size()));
    check(pi == p_k.size(), $sformatf("%s: %0d table outputs for %0d inputs", name, pi, p_k.size()));
    // No error flags: bits 0..3 and 8.
    check((result_vektor & 9'h10F) == 0, $sformatf("%s: error flags %b", name, result_vektor));
    $display("%s: %0d gantry and %0d table pulses in, %0d pulses out", name, g_k.size(),
             p_k.size(), out_k.size());
    reset_vektor = 9'h1FF;
    wait_us(4);
    reset_vektor = 9'h000;
    wait_us(4);
    check(result_vektor == 0, $sformatf("%s: flags cleared", name));
    out_t.delete(); out_k.delete(); g_t.delete(); g_k.delete(); p_t.delete(); p_k.delete();
  endtask

  initial begin
    int period;
    kind_e k;
    logic [8:0] seen;

    wait_us(5);
    rst_n = 1;
    wait_us(10);

    // ---- A: spiral, random gantry period, table at about 1:10 ----
    mode_sp = 0;
    fork
      begin
        for (int i = 0; i < 300; i++) begin
          k = (i % 8 == 7) ? K_APR : K_AP;
          gantry(k, ap_len(k), 700 + int'($urandom_range(600)));
        end
      end
      begin
        kind_e tk;
        wait_us(3000);
        for (int j = 0; j < 28; j++) begin
          tk = (j % 4 == 3) ? K_HTPR : K_HTP;
          table_pulse(tk, ap_len(tk));
          wait_us(7000 + int'($urandom_range(5000)));
        end
      end
    join
    seen = result_vektor;
    check(seen[4] && seen[5] && seen[6] && seen[7], $sformatf("A: activity flags %b", seen));
    compare("A spiral 1:10", 1);

    // ---- B: spiral, table at 1:2, fixed gantry periods ----
    for (int n = 0; n < 2; n++) begin
      period = (n == 0) ? 700 : 1300;
      fork
        begin
          for (int i = 0; i < 120; i++) begin
            k = (i % 8 == 7) ? K_APR : K_AP;
            gantry(k, ap_len(k), period);
          end
        end
        begin
          kind_e tk;
          int len;
          wait_us(100 + int'($urandom_range(period)));
          for (int j = 0; j < 58; j++) begin
            tk = (j % 3 == 2) ? K_HTPR : K_HTP;
            len = ap_len(tk);
            table_pulse(tk, len);
            wait_us(2 * period - len);
          end
        end
      join
      compare($sformatf("B spiral 1:2 period %0d", period), 1);
    end

    // ---- C: single axis, table only (topogram), then gantry only (tomogram) ----
    mode_sp = 1;
    wait_us(10);
    for (int j = 0; j < 60; j++) begin
      k = (j % 5 == 4) ? K_HTPR : K_HTP;
      period = ap_len(k);
      table_pulse(k, period);
      wait_us(700 - period);
    end
    compare("C topogram", 0);
    for (int i = 0; i < 60; i++) begin
      k = (i % 8 == 7) ? K_APR : K_AP;
      gantry(k, ap_len(k), 700);
    end
    compare("C tomogram", 0);

    $display("outputs: Ap %0d, Apr %0d, Htp %0d, Htpr %0d", n_out[K_AP], n_out[K_APR],
             n_out[K_HTP], n_out[K_HTPR]);
    check(n_out[K_AP] > 0 && n_out[K_APR] > 0 && n_out[K_HTP] > 0 && n_out[K_HTPR] > 0,
          "all four kinds sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000 * 1000 * US);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
