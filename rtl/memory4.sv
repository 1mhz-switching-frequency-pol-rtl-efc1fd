`timescale 1ns/1ps
// memory4: derivative-parameter look-up table, b = (K_D / A) * y2(k-1).
//
// Scales the counter value sensed in the previous term by K_D / A, with
// A = K_P + K_I + K_D, so that address' = y1(k) + a - b reproduces the
// derivative part of the PID law. Indexed by the unsigned N-bit y2(k-1);
// returns b unsigned, rounded to nearest (halves up; this design's choice).
// With K_D = 0, the published setting, every entry is 0.
//   Combinational read: the table is built from logic, not a clocked RAM.
module memory4 #(
  parameter int unsigned N  = dpwm_pkg::N_BITS,
  parameter int unsigned KP = 5,
  parameter int unsigned KI = 0,
  parameter int unsigned KD = 0
) (
  input  logic [N-1:0] y2_prev,
  output logic [N-1:0] b
);

  localparam int unsigned DEPTH = 2 ** N;
  localparam int unsigned A_GAIN = (KP + KI + KD == 0) ? 1 : (KP + KI + KD);

  typedef logic [N-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t t;
    for (int unsigned i = 0; i < DEPTH; i++)
      t[i] = N'((2 * KD * i + A_GAIN) / (2 * A_GAIN));
    return t;
  endfunction

  localparam rom_t ROM = gen_table();

  assign b = ROM[y2_prev];

endmodule
