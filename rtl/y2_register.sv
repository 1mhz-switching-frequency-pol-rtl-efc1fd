`timescale 1ns/1ps
// y2_register: holds the previous term's sensed value (D-ff 3 and D-ff 2).
//
// The derivative term needs y2(k-1) = y1(k-1), the counter value sensed in
// the previous switching term. D-ff 3 stores the counter on the latch pulse
// (y2 = y1 of the current term). D-ff 2 copies D-ff 3 one clock after the
// latch, so that during the next term, up to and including its own latch
// clock, y2_prev holds the value sensed in the term before.
//   Clocking D-ff 2 one clock after D-ff 3, instead of on the same edge, is
//   this design's choice: with both on one edge D-ff 2 would lag one term
//   more than the derivative law asks for. Both registers reset to zero.
//   Note that on the latch clock itself D-ff 3 still holds the previous
//   sample, so within the controller (which reads the duty table only on
//   that clock) D-ff 2 gives the same result as D-ff 3; it is kept because
//   it holds y2(k-1) steady over the whole next term.
module y2_register #(
  parameter int unsigned N = dpwm_pkg::N_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] y1,
  input  logic         latch,
  output logic [N-1:0] y2,
  output logic [N-1:0] y2_prev
);

  logic latch_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y2      <= '0;
      y2_prev <= '0;
      latch_d <= 1'b0;
    end else begin
      latch_d <= latch;
      if (latch)   y2      <= y1;
      if (latch_d) y2_prev <= y2;
    end
  end

endmodule
