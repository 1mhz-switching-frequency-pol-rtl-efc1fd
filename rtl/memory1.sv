`timescale 1ns/1ps
// memory1: reference-waveform look-up table feeding the DAC.
//
// Addressed by the term counter y1, it returns the DAC code for that point of
// the switching term. The DAC turns the code into the reference voltage
// V_ref that the analog comparator holds against the converter output, so
// the table decides the shape of the reference ramp. The controller uses the
// step-down sawtooth: full scale (V_ref^+) at count 0, falling one LSB per
// clock to zero at the last count. Because the table can hold any shape,
// the WAVE parameter also offers a rising sawtooth and a triangle.
//   Timing: the code is registered, so dac_code shows the entry for the
//   count of the previous clock (one clock of latency, constant).
// The contents are computed at elaboration; the formula is data = 2**N-1-addr
// for the step-down sawtooth. The registered output is this design's choice.
module memory1 #(
  parameter int unsigned   N    = dpwm_pkg::N_BITS,
  parameter dpwm_pkg::wave_e WAVE = dpwm_pkg::WAVE_SAW_DOWN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] addr,
  output logic [N-1:0] dac_code
);

  localparam int unsigned DEPTH = 2 ** N;
  localparam int unsigned MAXV  = DEPTH - 1;

  typedef logic [N-1:0] rom_t [DEPTH];

  function automatic rom_t gen_table();
    rom_t t;
    for (int unsigned i = 0; i < DEPTH; i++) begin
      unique case (WAVE)
        dpwm_pkg::WAVE_SAW_UP:   t[i] = N'(i);
        dpwm_pkg::WAVE_TRIANGLE: t[i] = (i < DEPTH / 2) ? N'(2 * i) : N'(2 * (MAXV - i));
        default:                 t[i] = N'(MAXV - i);
      endcase
    end
    return t;
  endfunction

  localparam rom_t ROM = gen_table();

  always_ff @(posedge clk) begin
    if (!rst_n) dac_code <= ROM[0];
    else        dac_code <= ROM[addr];
  end

endmodule
