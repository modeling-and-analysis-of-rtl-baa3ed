// Shared types and constants of the discrete-time digital LDO.
//
// The regulator is built from a 3-comparator flash ADC, a Table-I style
// decoder that turns the ADC code and a 2-bit programmable gain into shift
// controls, a 128-bit bidirectional barrel shifter that drives the gates of
// the pull-up PMOS bank, and an adaptive controller that picks one of three
// sampling clock frequencies from the shifter fill level.
//
// Conventions used throughout (shifter word A[N-1:0]):
//   * A PMOS gate at 0 turns its device on.  The word is a thermometer code
//     with ones at the top and zeros at the bottom, so the number of devices
//     on is the number of zeros counted up from bit 0.
//   * "Up" (d = 1) moves the word towards higher bit numbers and fills 0 at
//     the bottom: more devices on.  "Down" (d = 0) moves it towards bit 0 and
//     fills 1 at the top: fewer devices on.
`timescale 1ns / 1ps
package dldo_pkg;

  // Default sizes of the design.
  localparam int unsigned N_PMOS   = 128;  // width of the shifter / PMOS bank
  localparam int unsigned DEF_HI_TAP   = 80;   // shifter bit watched for heavy load
  localparam int unsigned DEF_LO_TAP   = 40;   // shifter bit watched for light load
  localparam int unsigned DEF_CNT_W    = 10;   // width of each load-watch counter

  // Sampling frequency selected by the adaptive controller.
  typedef enum logic [1:0] {
    F_NOMINAL = 2'd0,
    F_LOW     = 2'd1,
    F_HIGH    = 2'd2
  } fsel_e;

  // Barrel shifter controls of Table I.
  //   d     : 1 = shift up (more devices on), 0 = shift down
  //   mux_1 : first mux level moves the word by 2 positions when set
  //   mux_2 : second mux level moves the word by 1 position when set
  typedef struct packed {
    logic d;
    logic mux_1;
    logic mux_2;
  } shift_ctrl_t;

endpackage
