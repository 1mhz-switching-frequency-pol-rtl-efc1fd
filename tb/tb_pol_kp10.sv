`timescale 1ns/1ps
// tb_pol_kp10: the published operating conditions at the higher gain
// K_P = 10 (K_I = K_D = 0; u_ref = 86 and r = 40 kept from the K_P = 5
// table), closed around the behavioural buck stage (12 V in, 3.3 uH,
// 10 uF with 50 mOhm ESR, electronic load with 50 A/us slew).
//   * Static characteristic: at 0.3, 0.5, 0.7 and 0.9 A the mean output
//     over 20 terms must lie within 1.5 V +/- 3 %.
//   * Load steps 0.3 -> 0.9 A and 0.9 -> 0.3 A: the output must be back in
//     the +/- 3 % band, for good, within 11 terms (about 10 us, the
//     published settling time); undershoot and overshoot are reported.
//   * Every term must latch (one comparator trigger per term), except terms
//     in which the output overshoots above the ramp top: those must be cut
//     by the overvoltage protection instead.
module tb_pol_kp10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] eo_uv, iload_ma, vref_uv;
  logic pwm, v_comp, latch, ovp_q;
  logic [8:0] u_k;
  int checks = 0, failures = 0;

  dpwm_pol #(.KP(10)) dut (.clk, .rst_n, .eo_uv, .pwm, .u_k, .v_comp, .latch, .ovp_q, .vref_uv);

  buck_model #(.ESR(0.05), .V0(1.5), .I0(0.3)) plant (.clk, .pwm, .iload_ma, .eo_uv);

  always #1 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int term = 0, n_term_latch = 0, n_term_ovp = 0, n_term_bad = 0, latched_this = 0, counting = 0;

  always @(posedge clk) if (rst_n) begin
    if (latch) latched_this <= 1;
    if (dut.u_ctrl.y1 == 9'd511) begin
      term <= term + 1;
      if (counting != 0) begin
        if (latched_this != 0 || latch) n_term_latch <= n_term_latch + 1;
        else if (ovp_q)                 n_term_ovp <= n_term_ovp + 1;
        else                            n_term_bad <= n_term_bad + 1;
      end
      latched_this <= 0;
    end
  end

  task automatic term_stats(output real mean_v, output real min_v, output real max_v);
    longint s;
    s = 0; min_v = 9.0; max_v = 0.0;
    repeat (512) begin
      real v;
      @(posedge clk);
      v = real'(eo_uv) * 1.0e-6;
      s += longint'(eo_uv);
      if (v < min_v) min_v = v;
      if (v > max_v) max_v = v;
    end
    mean_v = real'(s) / 512.0 * 1.0e-6;
  endtask

  task automatic static_point(input int ma);
    real m, lo, hi, acc;
    iload_ma = 32'(ma);
    repeat (60) term_stats(m, lo, hi);
    acc = 0.0;
    for (int t = 0; t < 20; t++) begin term_stats(m, lo, hi); acc += m; end
    acc = acc / 20.0;
    checks++;
    if (acc < 1.455 || acc > 1.545) begin
      failures++; $display("static %0d mA: %0.4f V outside the band", ma, acc);
    end else $display("static %0d mA: %0.4f V (%0.2f %%)", ma, acc, (acc - 1.5) / 1.5 * 100.0);
  endtask

  task automatic step(input int ma, input string what);
    real m, lo, hi, vmin, vmax;
    int settled;
    vmin = 9.0; vmax = 0.0; settled = -1;
    iload_ma = 32'(ma);
    for (int t = 0; t < 40; t++) begin
      term_stats(m, lo, hi);
      if (lo < vmin) vmin = lo;
      if (hi > vmax) vmax = hi;
      if (lo >= 1.455 && hi <= 1.545) begin
        if (settled < 0) settled = t;
      end else settled = -1;
    end
    checks++;
    if (settled < 0 || settled > 11) begin
      failures++; $display("%s: settled after %0d terms", what, settled);
    end else $display("%s: in band after %0d terms (%0.1f us), min %0.3f V, max %0.3f V",
                      what, settled, real'(settled) * 1.024, vmin, vmax);
  endtask

  initial begin
    iload_ma = 32'd300;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (40) @(posedge clk);
    counting = 1;
    static_point(300);
    static_point(500);
    static_point(700);
    static_point(900);
    step(300, "0.9 -> 0.3 A");
    step(900, "0.3 -> 0.9 A");
    step(300, "0.9 -> 0.3 A");
    counting = 0;
    $display("terms with a latch %0d, cut by the protection %0d, neither %0d",
             n_term_latch, n_term_ovp, n_term_bad);
    checks++;
    if (n_term_bad != 0 || n_term_latch == 0) begin failures++; $display("terms without a latch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
