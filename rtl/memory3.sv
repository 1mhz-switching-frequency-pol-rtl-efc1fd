`timescale 1ns/1ps
// memory3: integral-parameter look-up table, a = (K_I / A) * n_I(k-1).
//
// The PID law is rearranged so that the duty table (memory2) is indexed by
// address' = y1(k) + a - b with A = K_P + K_I + K_D. This table scales the
// held integral factor n_I(k-1) by K_I / A. It is indexed by the N-bit
// two's-complement value of n_I(k-1) and returns a as an N-bit
// two's-complement number, rounded to the nearest integer (halves away from
// zero; the rounding rule is this design's choice). Since K_I / A <= 1 the
// result always fits. With K_I = 0, the published setting, every entry is 0.
//   Combinational read: the table is built from logic, not a clocked RAM.
module memory3 #(
  parameter int unsigned N  = dpwm_pkg::N_BITS,
  parameter int unsigned KP = 5,
  parameter int unsigned KI = 0,
  parameter int unsigned KD = 0
) (
  input  logic signed [N-1:0] ni_prev,
  output logic signed [N-1:0] a
);

  localparam int unsigned DEPTH = 2 ** N;
  localparam int A_GAIN = (KP + KI + KD == 0) ? 1 : int'(KP + KI + KD);

  typedef logic [N-1:0] rom_t [DEPTH];

  function automatic int div_round(input int num, input int den);
    if (num >= 0) return (2 * num + den) / (2 * den);
    else          return -((-2 * num + den) / (2 * den));
  endfunction

  function automatic rom_t gen_table();
    rom_t t;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int ni;
      ni   = (i >= DEPTH / 2) ? int'(i) - int'(DEPTH) : int'(i);
      t[i] = N'(div_round(int'(KI) * ni, A_GAIN));
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_table();

  assign a = $signed(ROM[ni_prev]);

endmodule
