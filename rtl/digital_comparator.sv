`timescale 1ns/1ps
// digital_comparator: turns the duty word into the PWM waveform.
//
// PWM' is high while the term counter y1 is below the duty word u_k, so the
// on-time of a term is u_k clocks out of 2**N. Because u_k is preset to its
// maximum at the start of each term and only drops when the comparator
// trips, the output switches on at the start of the term and off at the
// first clock where y1 >= u_k; if the trip comes after that count, the
// output turns off at once. The comparison result is registered (one clock
// of latency) so the gate drive sees a glitch-free signal; the register is
// this design's choice.
module digital_comparator #(
  parameter int unsigned N = dpwm_pkg::N_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y1,
  input  logic [N-1:0] u_k,
  output logic         pwm_raw
);

  always_ff @(posedge clk) begin
    if (!rst_n) pwm_raw <= 1'b0;
    else        pwm_raw <= (y1 < u_k);
  end

endmodule
