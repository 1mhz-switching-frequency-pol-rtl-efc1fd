`timescale 1ns/1ps
// tb_dpwm_pol: end-to-end closed-loop run of the complete control loop at
// its default parameters (9 bits, 500 MHz, K_P = 5, K_I = K_D = 0,
// u_ref = 86, r = 40), driving a behavioural buck power stage (12 V in,
// 3.3 uH, 10 uF, electronic load).
//
// Sequence: cold start from 0 V at 0.3 A (there is no soft start: the duty
// table runs at its limit and the overshoot is caught by the overvoltage
// protection), load step 0.3 A -> 0.9 A and back at 50 A/us, then an
// overvoltage injected on the sensed voltage.
// The output capacitor is given 50 mOhm of ESR: with the ESR of a bare
// ceramic part the proportional loop rings.
// Checks:
//   * the start-up reaches the +/- 3 % band and stays there within 150 terms;
//   * steady state at 0.3 A and 0.9 A: the mean output over 20 terms within
//     1.5 V +/- 3 %;
//   * after each load step the output returns to that band and stays there;
//   * switching term = 512 clocks (977 kHz) and the duty word changes at
//     most 11 ns after the comparator edge;
//   * every term with E_o above the top of the ramp has its PWM cut by the
//     protection (on-time <= 17 clocks);
//   * each mechanism occurs: latch per term, the duty limit of the table,
//     a term without trip (start-up), the protection.
module tb_dpwm_pol;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] eo_uv, eo_model_uv, iload_ma, vref_uv;
  logic [31:0] eo_offset_uv = 32'd0;
  logic pwm, v_comp, latch, ovp_q;
  logic [8:0] u_k;
  int checks = 0, failures = 0;

  dpwm_pol dut (.clk, .rst_n, .eo_uv, .pwm, .u_k, .v_comp, .latch, .ovp_q, .vref_uv);

  buck_model #(.ESR(0.05)) plant (.clk, .pwm, .iload_ma, .eo_uv(eo_model_uv));

  assign eo_uv = eo_model_uv + eo_offset_uv;

  always #1 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-term bookkeeping, keyed to the controller's term counter.
  int term = 0, on_cnt = 0, last_on = 0, term_len = 0, last_len = 0;
  int n_latch_terms = 0, n_notrip = 0, n_limit = 0, n_ovp = 0, latched_this = 0;
  int worst_reflect = 0, since_rise = -1;
  int over_this = 1, n_over_terms = 0, n_over_bad = 0;
  logic v_comp_d = 1'b0;
  longint eo_sum = 0;
  int eo_n = 0;

  always @(posedge clk) if (rst_n) begin
    on_cnt   <= on_cnt + int'(pwm);
    term_len <= term_len + 1;
    v_comp_d <= v_comp;
    if (v_comp && !v_comp_d) since_rise <= 0;
    else if (since_rise >= 0) since_rise <= since_rise + 1;
    if (latch) begin
      latched_this <= 1;
      if (since_rise + 1 > worst_reflect) worst_reflect <= since_rise + 1;
      if (int'(dut.u_ctrl.u_data) == 500) n_limit <= n_limit + 1;
    end
    if (dut.u_ctrl.y1 <= 9'd16 && eo_uv <= 32'd1_600_000) over_this <= 0;
    if (dut.u_ctrl.y1 == 9'd511) begin
      over_this <= 1;
      if (over_this != 0) begin
        n_over_terms <= n_over_terms + 1;
        if (on_cnt + int'(pwm) > 17) n_over_bad <= n_over_bad + 1;
      end
      term     <= term + 1;
      last_on  <= on_cnt + int'(pwm);
      last_len <= term_len + 1;
      on_cnt   <= 0;
      term_len <= 0;
      if (latched_this != 0 || latch) n_latch_terms <= n_latch_terms + 1;
      else                            n_notrip <= n_notrip + 1;
      if (ovp_q) n_ovp <= n_ovp + 1;
      latched_this <= 0;
    end
  end

  task automatic wait_terms(input int n);
    int t0;
    t0 = term;
    wait (term >= t0 + n);
  endtask

  // Mean output over n terms, sampled once per clock.
  task automatic mean_eo(input int n, output real mean_v, output real min_v, output real max_v);
    longint s;
    int cnt;
    s = 0; cnt = 0; min_v = 9.0; max_v = 0.0;
    repeat (n * 512) begin
      @(posedge clk);
      s += longint'(eo_model_uv);
      cnt++;
      if (real'(eo_model_uv) * 1.0e-6 < min_v) min_v = real'(eo_model_uv) * 1.0e-6;
      if (real'(eo_model_uv) * 1.0e-6 > max_v) max_v = real'(eo_model_uv) * 1.0e-6;
    end
    mean_v = real'(s) / real'(cnt) * 1.0e-6;
  endtask

  task automatic check_band(input string what, input real v);
    checks++;
    if (v < 1.455 || v > 1.545) begin
      failures++; $display("%s: %0.4f V outside 1.5 V +/- 3 %%", what, v);
    end else $display("%s: %0.4f V", what, v);
  endtask

  // Terms after a load step until the output is back in the band for good.
  task automatic settle(input string what, input int max_terms, output int terms_needed, output real extreme);
    int in_band_run;
    real m, lo, hi;
    in_band_run = 0; terms_needed = -1;
    extreme = 1.5;
    for (int t = 0; t < max_terms; t++) begin
      mean_eo(1, m, lo, hi);
      if (lo < extreme) extreme = lo;
      if (hi > 1.5 && hi - 1.5 > 1.5 - extreme && extreme >= 1.5) extreme = hi;
      if (lo >= 1.455 && hi <= 1.545) begin
        in_band_run++;
        if (in_band_run == 1) terms_needed = t;
      end else begin
        in_band_run = 0; terms_needed = -1;
      end
    end
    checks++;
    if (terms_needed < 0) begin failures++; $display("%s: never settled", what); end
    else $display("%s: back within +/-3 %% after %0d terms (%0.1f us)", what, terms_needed,
                  real'(terms_needed) * 1.024);
  endtask

  initial begin
    real m, lo, hi, ext;
    int tn;
    iload_ma = 32'd300;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;

    // Start-up and steady state at 0.3 A.
    settle("start-up from 0 V", 150, tn, ext);
    mean_eo(20, m, lo, hi);
    check_band("steady state 0.3 A", m);
    $display("  ripple %0.1f mV, duty word %0d", (hi - lo) * 1e3, u_k);
    checks++;
    if (last_len != 512) begin failures++; $display("term length %0d clocks", last_len); end

    // Light to heavy load.
    @(posedge clk) iload_ma = 32'd900;
    settle("0.3 -> 0.9 A", 60, tn, ext);
    $display("  lowest output %0.3f V", ext);
    mean_eo(20, m, lo, hi);
    check_band("steady state 0.9 A", m);

    // Heavy to light load.
    @(posedge clk) iload_ma = 32'd300;
    settle("0.9 -> 0.3 A", 60, tn, ext);
    mean_eo(20, m, lo, hi);
    check_band("steady state 0.3 A again", m);

    // Overvoltage on the sensed voltage: +400 mV for 8 terms lifts E_o
    // above 1.6 V.
    @(posedge clk) eo_offset_uv = 32'd400_000;
    wait_terms(8);
    eo_offset_uv = 32'd0;
    checks++;
    if (n_over_terms == 0 || n_over_bad != 0) begin
      failures++; $display("protection: %0d terms above the ramp, %0d not cut", n_over_terms, n_over_bad);
    end else $display("protection cut all %0d terms with E_o above the ramp", n_over_terms);
    settle("after overvoltage", 80, tn, ext);

    checks++;
    if ((worst_reflect + 1) * 2 > 11) begin failures++; end
    $display("comparator edge to latch: %0d clocks, new duty word one clock later", worst_reflect);
    $display("terms %0d: latched %0d, without trip %0d, at duty limit %0d, protected %0d",
             term, n_latch_terms, n_notrip, n_limit, n_ovp);
    checks++;
    if (n_latch_terms == 0 || n_notrip == 0 || n_limit == 0 || n_ovp == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
