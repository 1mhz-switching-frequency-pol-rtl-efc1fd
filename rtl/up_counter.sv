`timescale 1ns/1ps
// up_counter: free-running N-bit counter that defines the switching term.
//
// y1 counts 0, 1, ..., 2**N-1 and wraps, one step per system clock, so one
// switching term lasts 2**N clocks (512 clocks at N = 9, i.e. 977 kHz at a
// 500 MHz clock). The same count addresses the reference-waveform table,
// is sampled as the sensed output voltage when the comparator trips, and is
// compared with the duty word to form the PWM edge.
// Reset (active low, synchronous to clk) to zero is an implementation choice.
module up_counter #(
  parameter int unsigned N = dpwm_pkg::N_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] y1
);

  always_ff @(posedge clk) begin
    if (!rst_n) y1 <= '0;
    else        y1 <= y1 + 1'b1;
  end

endmodule
