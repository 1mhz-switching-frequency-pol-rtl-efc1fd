`timescale 1ns/1ps
// pr_generator: preset-pulse generator for the duty latch.
//
// Raises pr during the last count of every switching term (y1 = 2**N-1).
// The duty latch (D-ff 4) responds at the clock edge that ends the term by
// loading its preset value, so every term starts with the duty word at its
// maximum and the PWM output on until the comparator trip sets the real
// duty. Decoding the last count is this design's choice of "the last of the
// switching term". Combinational decode of the counter.
module pr_generator #(
  parameter int unsigned N = dpwm_pkg::N_BITS
) (
  input  logic [N-1:0] y1,
  output logic         pr
);

  assign pr = (y1 == N'(2 ** N - 1));

endmodule
