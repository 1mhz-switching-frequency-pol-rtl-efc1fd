`timescale 1ns/1ps
// buck_model: behavioural model of the synchronous buck power stage for
// closed-loop simulation (not synthesizable, testbench only).
//
// A gate driver with two MOSFETs switches the inductor between VIN (pwm = 1)
// and ground (pwm = 0); the inductor L with series resistance DCR feeds the
// output capacitor C with series resistance ESR and an electronic load that
// sinks iload_ma milliamperes, reached at a limited slew rate. The state is
// integrated with forward Euler once per clock (T_STEP seconds). The output
// voltage leaves as an integer number of microvolts, clipped at zero.
//   Defaults: 12 V in, 3.3 uH, 10 uF and a 50 A/us load slew, the published
//   test conditions; DCR, ESR and the ideal switches are this model's
//   choices.
module buck_model #(
  parameter real VIN     = 12.0,
  parameter real L_H     = 3.3e-6,
  parameter real C_F     = 10.0e-6,
  parameter real DCR     = 0.02,
  parameter real ESR     = 0.005,
  parameter real T_STEP  = 2.0e-9,
  parameter real SLEW    = 50.0e6,     // load slew rate in A/s
  parameter real V0      = 0.0,        // initial capacitor voltage
  parameter real I0      = 0.0         // initial inductor and load current
) (
  input  logic        clk,
  input  logic        pwm,
  input  logic [31:0] iload_ma,
  output logic [31:0] eo_uv
);

  real i_l   = I0;
  real v_cap = V0;
  real i_ld  = I0;
  real v_out = V0;

  always @(posedge clk) begin
    real v_sw, target, step;
    v_sw   = pwm ? VIN : 0.0;
    target = real'(iload_ma) * 1.0e-3;
    step   = SLEW * T_STEP;
    if (i_ld < target - step)      i_ld = i_ld + step;
    else if (i_ld > target + step) i_ld = i_ld - step;
    else                           i_ld = target;
    v_out = v_cap + ESR * (i_l - i_ld);
    i_l   = i_l + (v_sw - i_l * DCR - v_out) / L_H * T_STEP;
    v_cap = v_cap + (i_l - i_ld) / C_F * T_STEP;
  end

  assign eo_uv = (v_out <= 0.0) ? 32'd0 : 32'($rtoi(v_out * 1.0e6));

endmodule
