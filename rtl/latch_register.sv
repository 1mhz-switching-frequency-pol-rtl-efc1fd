`timescale 1ns/1ps
// latch_register: the duty latch (D-ff 4) and its trigger.
//
// The duty table is read every clock for the current counter value, so a
// candidate duty word is always waiting at u_data. The comparator output
// v_comp rises when the falling reference ramp crosses the converter output;
// that rising edge is the trigger that freezes the current table word into
// u_k, which then sets the on-time of the same switching term. The pr pulse
// at the end of each term presets u_k to U_PRESET (the maximum) for the next.
//
// v_comp comes from an analog comparator and is asynchronous to clk, so it
// passes a SYNC_STAGES flip-flop synchronizer before the edge detector. Only
// the first rising edge in a term is taken; later comparator chatter is
// ignored until the next preset. A rise during the first BLANK_CNT counts of
// a term is ignored too: the comparator output then still answers the
// previous term's last DAC codes (register, DAC, comparator and synchronizer
// delays), and an output voltage just above the bottom of the ramp would
// otherwise trip the new term at once with a near-zero duty word. A real
// crossing that early means E_o is within a few LSB of V_ref^+, which the
// overvoltage protection handles. latch is a one-clock pulse at the trigger,
// used by the other sensing registers; v_comp_s is the synchronized level.
//   Timing: a v_comp rise before clock edge t gives latch high after edge
//   t+SYNC_STAGES-1 and the new u_k after edge t+SYNC_STAGES (3 clocks,
//   6 ns at 500 MHz, with the default two-stage synchronizer).
// The synchronizer, the blanking window, the first-edge-only rule, pr having priority over a
// simultaneous trigger and reset to the preset value are this design's
// choices.
module latch_register #(
  parameter int unsigned N           = dpwm_pkg::N_BITS,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned U_PRESET    = 2 ** N - 1,
  parameter int unsigned BLANK_CNT   = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y1,
  input  logic         v_comp,
  input  logic [N-1:0] u_data,
  input  logic         pr,
  output logic [N-1:0] u_k,
  output logic         latch,
  output logic         v_comp_s
);

  logic [SYNC_STAGES-1:0] sync;
  logic                   v_prev;
  logic                   armed;

  always_ff @(posedge clk) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[SYNC_STAGES-2:0], v_comp};
  end

  assign v_comp_s = sync[SYNC_STAGES-1];
  assign latch    = v_comp_s & ~v_prev & armed & ~pr & (y1 >= N'(BLANK_CNT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_prev <= 1'b0;
      armed  <= 1'b1;
      u_k    <= N'(U_PRESET);
    end else begin
      v_prev <= v_comp_s;
      if (pr) begin
        u_k   <= N'(U_PRESET);
        armed <= 1'b1;
      end else if (latch) begin
        u_k   <= u_data;
        armed <= 1'b0;
      end
    end
  end

endmodule
