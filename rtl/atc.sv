`timescale 1ns/1ps
// atc: behavioural model of the analog timing converter (DAC + comparator).
//
// This is a model of analog parts, not logic to be synthesized into the
// controller: on the board the block is a parallel-input DAC followed by a
// fast analog comparator. The DAC turns the reference-table code into
// V_ref = VREF_MAX_UV * code / (2**N - 1); the comparator's + input is the
// converter output E_o and its - input is V_ref, so v_comp is high while
// E_o > V_ref. With a falling reference ramp, v_comp rises at the moment the
// ramp crosses E_o; that edge is the "sensing" instant of the controller.
//
// Voltages are carried as unsigned integers in microvolts (eo_uv), which
// keeps the model inside plain two-state integer logic. Timing: the DAC
// latches its input code on the rising clock edge (one clock), and the
// comparator's propagation delay is modelled as CMP_DELAY further clocks.
// The 1.6 V full scale is the published V_ref^+; the delays and the
// microvolt representation are this model's choices.
module atc #(
  parameter int unsigned N           = dpwm_pkg::N_BITS,
  parameter int unsigned VREF_MAX_UV = 1_600_000,
  parameter int unsigned CMP_DELAY   = 2
) (
  input  logic         clk,
  input  logic [N-1:0] dac_code,
  input  logic [31:0]  eo_uv,
  output logic         v_comp,
  output logic [31:0]  vref_uv
);

  localparam int unsigned FULL = 2 ** N - 1;

  logic [N-1:0] dac_latch;
  logic [CMP_DELAY:0] cmp_pipe;

  // DAC input latch.
  always_ff @(posedge clk) dac_latch <= dac_code;

  // Ideal DAC transfer (no offset, no glitch).
  assign vref_uv = 32'((64'(VREF_MAX_UV) * 64'(dac_latch)) / 64'(FULL));

  // Ideal comparator decision, then its propagation delay.
  assign cmp_pipe[0] = (eo_uv > vref_uv);

  for (genvar d = 1; d <= CMP_DELAY; d++) begin : g_delay
    always_ff @(posedge clk) cmp_pipe[d] <= cmp_pipe[d-1];
  end

  assign v_comp = cmp_pipe[CMP_DELAY];

endmodule
