`timescale 1ns/1ps
// ovp: overvoltage protection logic.
//
// If the output voltage stays above the top of the reference ramp (V_ref^+),
// the comparator never trips, the duty word keeps its maximum preset and the
// converter would run at full duty. This block catches that case once per
// term. A reset pulse generator clears the flag Q at count RESET_CNT (the
// last count, so Q is low when the next term starts); a sample pulse
// generator then samples the comparator output into Q at count
// SAMPLE_CNT, early in the term when the reference is still near V_ref^+.
// Q = 1 means E_o was above the reference at the sample point. A selector
// passes the PWM when Q = 0 and ground when Q = 1, so the term is cut off
// right after the sample and stays off until Q is cleared again.
//   Ports: y1 is the term counter, v_comp_s the synchronized comparator
//   output, pwm_in the comparator PWM', pwm the protected output.
//   Timing: Q changes on the clock after the sample count; pwm follows Q
//   combinationally. The reset and sample counts are this design's choice
//   (SAMPLE_CNT leaves room for the DAC, comparator and synchronizer delays
//   after the ramp returns to full scale).
module ovp #(
  parameter int unsigned N          = dpwm_pkg::N_BITS,
  parameter int unsigned RESET_CNT  = 2 ** N - 1,
  parameter int unsigned SAMPLE_CNT = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y1,
  input  logic         v_comp_s,
  input  logic         pwm_in,
  output logic         pwm,
  output logic         q
);

  logic reset_pulse, sample_pulse;

  assign reset_pulse  = (y1 == N'(RESET_CNT));
  assign sample_pulse = (y1 == N'(SAMPLE_CNT));

  always_ff @(posedge clk) begin
    if (!rst_n)            q <= 1'b0;
    else if (reset_pulse)  q <= 1'b0;
    else if (sample_pulse) q <= v_comp_s;
  end

  // Selector: Q = 0 -> PWM', Q = 1 -> ground.
  assign pwm = q ? 1'b0 : pwm_in;

endmodule
