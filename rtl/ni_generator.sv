`timescale 1ns/1ps
// ni_generator: integral-term accumulator (n_I signal generator and D-ff 1).
//
// The integral factor follows n_I(k) = n_I(k-1) + e(k) with the error
// e(k) = y1(k) - r, where y1(k) is the counter value at which the reference
// ramp crosses the output voltage and r is the counter value of the target
// voltage. The generator forms n_I(k) continuously from the running counter
// and the held n_I(k-1); on the latch pulse (the sensing instant) D-ff 1
// stores it, so ni_prev holds n_I(k-1) for the whole of the next term.
//   ni_prev is an N-bit two's-complement value. The accumulation saturates
//   at the ends of that range rather than wrapping, and resets to zero; both
//   are this design's choices (the width N is the published bus width).
module ni_generator #(
  parameter int unsigned N = dpwm_pkg::N_BITS,
  parameter int unsigned R = 40
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        y1,
  input  logic                latch,
  output logic signed [N-1:0] ni_prev
);

  localparam int NI_MAX = 2 ** (N - 1) - 1;
  localparam int NI_MIN = -(2 ** (N - 1));

  logic signed [N+2:0] sum;
  logic signed [N-1:0] ni_next;

  always_comb begin
    sum = (N+3)'(ni_prev) + (N+3)'($signed({1'b0, y1})) - (N+3)'(R);
    if (sum > (N+3)'(NI_MAX))      ni_next = N'(NI_MAX);
    else if (sum < (N+3)'(NI_MIN)) ni_next = N'(NI_MIN);
    else                           ni_next = sum[N-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     ni_prev <= '0;
    else if (latch) ni_prev <= ni_next;
  end

endmodule
