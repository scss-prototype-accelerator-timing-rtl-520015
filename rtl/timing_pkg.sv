// timing_pkg: constants and types shared by the accelerator timing-system RTL.
//
// The numbers here are the ones of the prototype timing system: a 238 MHz
// counter clock that is exactly 1/24 of the 5712 MHz C-band reference, eight
// delayed outputs per trigger delay unit (TDU), a 24-bit delay counter and a
// 15-bit output-width counter, nine TDUs fed from one master trigger unit
// (MTU), and an operation cycle of 1 Hz to 60 Hz derived from a 60 Hz clock.
// The master-trigger pulse length and the divide-ratio width are this
// design's own choices.
package timing_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Trigger delay unit.
  localparam int unsigned TDU_CHANNELS  = 8;
  localparam int unsigned DELAY_BITS    = 24;  // 2^24 cycles of 238 MHz = 70.5 ms
  localparam int unsigned WIDTH_BITS    = 15;  // output pulse width, 238 MHz cycles
  localparam int unsigned NUM_TDU       = 9;

  // Master trigger unit.
  localparam int unsigned DIV_BITS      = 6;   // divide ratio 1..60 (60 Hz .. 1 Hz)
  localparam int unsigned MTU_PULSE_CYC = 8;   // master trigger length, 238 MHz cycles

  // State of one delay channel.
  typedef enum logic [1:0] {
    CH_IDLE  = 2'd0,   // waiting for a master trigger
    CH_DELAY = 2'd1,   // counting the programmed delay
    CH_PULSE = 2'd2    // driving the output for the programmed width
  } ch_state_e;
endpackage
