`timescale 1ns/1ps
// dpwm_pol: control loop of the point-of-load converter, from the sensed
// output voltage to the gate PWM.
//
// It joins the FPGA controller (digital_controller) with the analog timing
// converter (atc: DAC and comparator, a behavioural model). The DAC draws a
// falling ramp from 1.6 V to 0 V every switching term; the instant the ramp
// crosses the converter output E_o is the sensed voltage, expressed as the
// counter value at that instant. The controller answers with a new duty word
// within a few clocks, in the same term. The power stage (gate driver,
// MOSFETs, inductor, capacitor and load) is not part of this module: its
// output voltage enters as eo_uv and pwm leaves for its driver.
//   Ports: eo_uv is E_o in microvolts (an integer stand-in for the analog
//   net); pwm drives the gate driver; u_k, v_comp, latch, ovp_q and the
//   modelled ramp voltage vref_uv are probe signals. One clock of 2 ns
//   (500 MHz) per count, 512 counts per term at the default 9 bits.
//   Because atc is a model of analog parts, this top is for simulation; the
//   synthesizable part is digital_controller.
module dpwm_pol #(
  parameter int unsigned N           = dpwm_pkg::N_BITS,
  parameter int unsigned KP          = 5,
  parameter int unsigned KI          = 0,
  parameter int unsigned KD          = 0,
  parameter int unsigned U_REF       = 86,
  parameter int unsigned R           = 40,
  parameter int unsigned U_MIN       = 0,
  parameter int unsigned U_MAX       = 500,
  parameter int unsigned SAMPLE_CNT  = 16,
  parameter int unsigned VREF_MAX_UV = 1_600_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [31:0]  eo_uv,
  output logic         pwm,
  output logic [N-1:0] u_k,
  output logic         v_comp,
  output logic         latch,
  output logic         ovp_q,
  output logic [31:0]  vref_uv
);

  logic [N-1:0] dac_code;

  digital_controller #(
    .N(N), .KP(KP), .KI(KI), .KD(KD), .U_REF(U_REF), .R(R),
    .U_MIN(U_MIN), .U_MAX(U_MAX), .SYNC_STAGES(2), .SAMPLE_CNT(SAMPLE_CNT)
  ) u_ctrl (
    .clk, .rst_n, .dac_code, .v_comp, .pwm, .u_k, .latch, .ovp_q
  );

  atc #(.N(N), .VREF_MAX_UV(VREF_MAX_UV), .CMP_DELAY(2)) u_atc (
    .clk, .dac_code, .eo_uv, .v_comp, .vref_uv
  );

endmodule
