`timescale 1ns/1ps
// memory2: duty-ratio look-up table (the proportional parameter table).
//
// Holds the pre-calculated duty word for every table address:
//   u = U_REF - (K_P + K_I) * R + A * address',  A = K_P + K_I + K_D,
// limited to U_MIN .. U_MAX. Together with address' = y1(k) + a - b this is
// the full PID law u(k) = u_ref + K_P e(k) + K_I n_I(k) + K_D (e(k)-e(k-1))
// with e(k) = y1(k) - r, so no arithmetic is left to do at the sensing
// instant: the duty word is one table read away. The limits give the table a
// flat (nonlinear) region at each end and a linear region of slope A in
// between; the higher the gain, the shorter the linear region.
//   Defaults: K_P = 5, K_I = K_D = 0, u_ref = 86, r = 40 and an upper limit
//   of 500, the published example table (entries 23 -> 1, 24 -> 6, ...,
//   122 -> 496, 123 and above -> 500). The lower limit 0 is from the same
//   table. Combinational read (logic-built table).
module memory2 #(
  parameter int unsigned N     = dpwm_pkg::N_BITS,
  parameter int unsigned KP    = 5,
  parameter int unsigned KI    = 0,
  parameter int unsigned KD    = 0,
  parameter int unsigned U_REF = 86,
  parameter int unsigned R     = 40,
  parameter int unsigned U_MIN = 0,
  parameter int unsigned U_MAX = 500
) (
  input  logic [N-1:0] addr,
  output logic [N-1:0] u
);

  localparam int unsigned DEPTH = 2 ** N;

  typedef logic [N-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t t;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      int v;
      v = int'(U_REF) - int'(KP + KI) * int'(R) + int'(KP + KI + KD) * int'(i);
      if (v < int'(U_MIN)) v = int'(U_MIN);
      if (v > int'(U_MAX)) v = int'(U_MAX);
      t[i] = N'(v);
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_table();

  assign u = ROM[addr];

endmodule
