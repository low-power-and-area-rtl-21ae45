// Shared constants of the pulsed-latch shift register.
//
// The word length (256 bits), the sub-shift-register length (4 bits) and the
// 200 MHz clock are the design's published operating point. The pulse timing
// (start-to-start spacing and width of the delayed clock pulses) is not
// published and is this design's own choice: five 250 ps pulses spaced 500 ps
// apart fit inside the 2.5 ns high phase of a 5 ns clock.
package pl_shift_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned WORD_LEN     = 256;   // bits in the whole shift register
  localparam int unsigned SUB_LEN      = 4;     // bits per sub-shift register
  localparam int unsigned CLK_PERIOD_PS = 5000; // 200 MHz
  localparam int unsigned PULSE_STEP_PS  = 500; // start-to-start spacing of the delayed pulses
  localparam int unsigned PULSE_WIDTH_PS = 250; // width of one pulsed clock
endpackage
