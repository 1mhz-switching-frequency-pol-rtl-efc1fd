`timescale 1ns/1ps
// tb_digital_controller: closes the loop around two controllers with an
// ideal comparator written here, v_comp = (E > dac_code), where E is the
// output voltage in DAC codes, chosen afresh for every switching term.
//
// Expected behaviour, derived independently of the RTL:
//   * dac_code = 511 - (count - 1): the step-down ramp, one clock behind.
//   * For 5 <= E <= 511 the comparator rises on count 513 - E; after two
//     synchronizer clocks the latch falls on count L = 515 - E (blanked
//     below count 8, too late from count 511 on).
//   * Controller A (K_P = 5, K_I = K_D = 0, u_ref = 86, r = 40) then holds
//     u = clamp(5 L - 114, 0, 500).
//   * Controller B (K_P = 4, K_I = 2, K_D = 2, A = 8) runs the full PID
//     recursion kept here: a = round(2 n_I / 8), b = round(2 y2 / 8),
//     address' = L + a - b, u = clamp(86 - 240 + 8 address', 0, 500),
//     n_I += L - 40 (saturating 9-bit), y2 = L.
//   * PWM on-time of a term = max(L + 1, u) clocks (on from the start of the
//     term with the preset word, off at the first count >= u after the
//     latch); 511 when nothing latches.
//   * E above the ramp top (overvoltage): no latch, the protection cuts the
//     PWM after the sample count: on-time 16 clocks.
// Every mechanism (latch, both table limits, a term without trip, the
// protection) must occur at least once.
module tb_digital_controller;
  localparam int unsigned N = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] dac_a, dac_b, u_a, u_b;
  logic v_comp_a, v_comp_b, pwm_a, pwm_b, latch_a, latch_b, q_a, q_b;
  int E;
  int checks = 0, failures = 0;

  digital_controller dut_a (
    .clk, .rst_n, .dac_code(dac_a), .v_comp(v_comp_a), .pwm(pwm_a), .u_k(u_a),
    .latch(latch_a), .ovp_q(q_a)
  );
  digital_controller #(.KP(4), .KI(2), .KD(2)) dut_b (
    .clk, .rst_n, .dac_code(dac_b), .v_comp(v_comp_b), .pwm(pwm_b), .u_k(u_b),
    .latch(latch_b), .ovp_q(q_b)
  );

  assign v_comp_a = (E > int'(dac_a));
  assign v_comp_b = (E > int'(dac_b));

  always #1 clk = ~clk;

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    int n_latch = 0, n_lo = 0, n_hi = 0, n_notrip = 0, n_ovp = 0;
    int ni = 0, y2 = 0;
    int on_a, on_b, exp_a, exp_b, lat_a, lat_b;
    int e_term, prev_e;
    E = 300;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    prev_e = 300;
    for (int k = 0; k < 400; k++) begin
      int L, ua, ub, a, b, addr;
      bit trip, ovp_term;
      // Pick the term's output voltage (in DAC codes).
      if (k < 2)                 e_term = 300;
      else if (k % 37 == 5)      e_term = 2;              // below the ramp: no trip
      else if (k % 23 == 7 && prev_e > 4) e_term = 530;   // above the ramp top
      else if (k % 11 == 3)      e_term = 495;            // latch at count 20: u limited to 0
      else if (k % 13 == 4)      e_term = 40;             // latch at count 475: u limited to 500
      else                       e_term = int'($urandom_range(470, 40));
      E = e_term;
      ovp_term = (e_term > 511);
      L = 515 - e_term;
      trip = !ovp_term && (L >= 8) && (L <= 510);
      // Expected duty words.
      if (trip) begin
        ua = clampi(5 * L - 114, 0, 500);
        a = (2 * ni >= 0) ? (2 * 2 * ni + 8) / 16 : -((-2 * 2 * ni + 8) / 16);
        b = (2 * 2 * y2 + 8) / 16;
        addr = clampi(L + a - b, 0, 511);
        ub = clampi(86 - 240 + 8 * addr, 0, 500);
        ni = clampi(ni + L - 40, -256, 255);
        y2 = L;
        exp_a = (L + 1 > ua) ? L + 1 : ua;
        exp_b = (L + 1 > ub) ? L + 1 : ub;
      end else begin
        ua = 511; ub = 511;
        exp_a = ovp_term ? 16 : 511;
        exp_b = exp_a;
      end
      on_a = 0; on_b = 0; lat_a = -1; lat_b = -1;
      for (int y = 0; y < 512; y++) begin
        // The count-0 sample belongs to the previous term's PWM window.
        if (y >= 1) begin on_a += int'(pwm_a); on_b += int'(pwm_b); end
        if (latch_a) lat_a = y;
        if (latch_b) lat_b = y;
        if (y >= 1 && k >= 1) begin
          checks++;
          if (int'(dac_a) != 511 - (y - 1)) begin
            failures++; $display("k=%0d y=%0d: dac_code=%0d", k, y, dac_a);
          end
        end
        @(negedge clk);
      end
      // Count 0 of the next term closes the PWM window of this one.
      on_a += int'(pwm_a); on_b += int'(pwm_b);
      if (k >= 1) begin
        checks++;
        if (lat_a != (trip ? L : -1) || lat_b != lat_a) begin
          failures++; $display("k=%0d E=%0d: latch at %0d/%0d, expected %0d", k, e_term, lat_a, lat_b, trip ? L : -1);
        end
        checks++;
        if (on_a != exp_a) begin
          failures++; $display("k=%0d E=%0d L=%0d: A on-time %0d, expected %0d", k, e_term, L, on_a, exp_a);
        end
        checks++;
        if (on_b != exp_b) begin
          failures++; $display("k=%0d E=%0d L=%0d: B on-time %0d, expected %0d (u=%0d)", k, e_term, L, on_b, exp_b, ub);
        end
        if (trip) n_latch++;
        if (trip && ua == 0) n_lo++;
        if (trip && ua == 500) n_hi++;
        if (!trip && !ovp_term) n_notrip++;
        if (ovp_term) n_ovp++;
      end
      prev_e = e_term;
    end
    $display("latches %0d, u at lower limit %0d, at upper limit %0d, terms without trip %0d, protection %0d",
             n_latch, n_lo, n_hi, n_notrip, n_ovp);
    checks++;
    if (n_latch == 0 || n_lo == 0 || n_hi == 0 || n_notrip == 0 || n_ovp == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
