`timescale 1ns/1ps
// digital_controller: look-up-table DPWM controller for a buck point-of-load
// converter, everything that runs in the FPGA.
//
// All parts run in parallel from one system clock:
//   * up_counter     y1 counts one switching term (2**N clocks).
//   * memory1        turns y1 into the DAC code of a falling reference ramp.
//   * (external)     DAC + comparator return v_comp = (E_o > V_ref).
//   * ni_generator   integral factor n_I, held in D-ff 1 (n_I(k-1)).
//   * y2_register    previous term's sensed count, D-ff 3 / D-ff 2.
//   * memory3/4      a = (K_I/A) n_I(k-1), b = (K_D/A) y2(k-1).
//   * address_adder  address' = y1 + a - b, advancing with the counter.
//   * memory2        duty word for every address' (precomputed PID law).
//   * latch_register D-ff 4 freezes memory2's word on the v_comp rise.
//   * pr_generator   presets D-ff 4 to its maximum at the end of each term.
//   * digital_comparator  PWM' = (y1 < u(k)).
//   * ovp            forces the PWM off for a term whose early sample of
//                    v_comp shows E_o above the top of the ramp.
// The sensed voltage is the counter value at which the ramp crosses E_o, so
// no A/D conversion and no arithmetic stand between the comparator edge and
// the new duty word: u(k) changes three clocks after v_comp rises and sets
// the on-time of the same term.
//   Ports: dac_code goes to the DAC (registered), v_comp comes from the
//   comparator (asynchronous), pwm goes to the gate driver. u_k, latch and
//   ovp_q are brought out as probe signals.
//   Parameter defaults are the published example: 9 bits, K_P = 5,
//   K_I = K_D = 0, u_ref = 86, r = 40, duty words limited to 0 .. 500.
module digital_controller #(
  parameter int unsigned N           = dpwm_pkg::N_BITS,
  parameter int unsigned KP          = 5,
  parameter int unsigned KI          = 0,
  parameter int unsigned KD          = 0,
  parameter int unsigned U_REF       = 86,
  parameter int unsigned R           = 40,
  parameter int unsigned U_MIN       = 0,
  parameter int unsigned U_MAX       = 500,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned SAMPLE_CNT  = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] dac_code,
  input  logic         v_comp,
  output logic         pwm,
  output logic [N-1:0] u_k,
  output logic         latch,
  output logic         ovp_q
);

  logic [N-1:0]        y1;
  logic signed [N-1:0] ni_prev;
  logic [N-1:0]        y2_prev;
  logic signed [N-1:0] a;
  logic [N-1:0]        b;
  logic [N-1:0]        addr2;
  logic [N-1:0]        u_data;
  logic                pr;
  logic                v_comp_s;
  logic                pwm_raw;

  up_counter #(.N(N)) u_counter (
    .clk, .rst_n, .y1
  );

  memory1 #(.N(N), .WAVE(dpwm_pkg::WAVE_SAW_DOWN)) u_memory1 (
    .clk, .rst_n, .addr(y1), .dac_code
  );

  ni_generator #(.N(N), .R(R)) u_ni (
    .clk, .rst_n, .y1, .latch, .ni_prev
  );

  y2_register #(.N(N)) u_y2 (
    .clk, .rst_n, .y1, .latch, .y2(), .y2_prev
  );

  memory3 #(.N(N), .KP(KP), .KI(KI), .KD(KD)) u_memory3 (
    .ni_prev, .a
  );

  memory4 #(.N(N), .KP(KP), .KI(KI), .KD(KD)) u_memory4 (
    .y2_prev, .b
  );

  address_adder #(.N(N)) u_addr (
    .y1, .a, .b, .addr(addr2)
  );

  memory2 #(.N(N), .KP(KP), .KI(KI), .KD(KD), .U_REF(U_REF), .R(R),
            .U_MIN(U_MIN), .U_MAX(U_MAX)) u_memory2 (
    .addr(addr2), .u(u_data)
  );

  pr_generator #(.N(N)) u_pr (
    .y1, .pr
  );

  latch_register #(.N(N), .SYNC_STAGES(SYNC_STAGES), .U_PRESET(2 ** N - 1),
                 .BLANK_CNT(8)) u_latch (
    .clk, .rst_n, .y1, .v_comp, .u_data, .pr, .u_k, .latch, .v_comp_s
  );

  digital_comparator #(.N(N)) u_dcmp (
    .clk, .rst_n, .y1, .u_k, .pwm_raw
  );

  ovp #(.N(N), .RESET_CNT(2 ** N - 1), .SAMPLE_CNT(SAMPLE_CNT)) u_ovp (
    .clk, .rst_n, .y1, .v_comp_s, .pwm_in(pwm_raw), .pwm, .q(ovp_q)
  );

  // The duty word is either a table word (at most U_MAX) or the preset.
  a_u_range: assert property (@(posedge clk) disable iff (!rst_n)
    (u_k <= N'(U_MAX)) || (u_k == N'(2 ** N - 1)));

  // While the protection flag is set the gate drive is off.
  a_ovp_off: assert property (@(posedge clk) disable iff (!rst_n)
    ovp_q |-> !pwm);

  // At most one latch per switching term.
  a_one_latch: assert property (@(posedge clk) disable iff (!rst_n)
    latch |=> !latch until_with pr);

endmodule
