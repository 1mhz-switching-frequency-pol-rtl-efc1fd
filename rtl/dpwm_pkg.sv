`timescale 1ns/1ps
// dpwm_pkg: constants and types shared by the look-up-table DPWM controller.
//
// The controller runs everything from one fast system clock. A 9-bit up
// counter defines the switching term (512 clocks, about 1 MHz at a 500 MHz
// clock), and every other quantity in the controller is a 9-bit word: the
// counter value y1, the DAC code, the table addresses and the duty word u(k).
// The 9-bit width and the 500 MHz clock are the published operating point;
// the waveform selector is this implementation's way of letting the
// reference-waveform table hold other shapes than the step-down sawtooth.
package dpwm_pkg;

  // PWM resolution: width of the counter, the duty word and all tables.
  localparam int unsigned N_BITS = 9;

  // Shapes the reference-waveform table can be filled with.
  typedef enum logic [1:0] {
    WAVE_SAW_DOWN = 2'd0,   // step-down sawtooth (the one used)
    WAVE_SAW_UP   = 2'd1,   // step-up sawtooth
    WAVE_TRIANGLE = 2'd2    // symmetric triangle, peak mid-term
  } wave_e;

endpackage
