// Adaptive sampling-frequency controller.
//
// The number of PMOS devices that are on tracks the load current, and with
// it the position of the output pole.  Two taps of the shifter word are
// watched by two counters:
//   * heavy-load counter: counts while A[HI_TAP] = 0 (more than HI_TAP
//     devices on) and is cleared whenever A[HI_TAP] = 1;
//   * light-load counter: counts while A[LO_TAP] = 1 (at most LO_TAP devices
//     on) and is cleared whenever A[LO_TAP] = 0.
// A counter that reaches all ones (2**CNT_W - 1 cycles of the same condition,
// i.e. about 1024 sampling cycles for CNT_W = 10) selects F_HIGH or F_LOW;
// otherwise F_NOMINAL is selected.  With a thermometer word both counters
// cannot be full at once; F_HIGH is given priority anyway.
//
// Taps, counter width and the enable/clear wiring follow the document.
// Registering the selection (so the clock generator sees a glitch-free
// code one cycle after a counter fills) is this design's choice.  The
// block runs on the sampling clock it controls, so it is at least
// 2**CNT_W times slower than the regulator loop.
`timescale 1ns / 1ps
module adaptive_ctrl
  import dldo_pkg::*;
#(
  parameter int unsigned N      = N_PMOS,
  parameter int unsigned HI_TAP = DEF_HI_TAP,
  parameter int unsigned LO_TAP = DEF_LO_TAP,
  parameter int unsigned CNT_W  = DEF_CNT_W
) (
  input  logic         clk,     // sampling clock
  input  logic         rst_n,
  input  logic [N-1:0] a,       // shifter gate word
  output fsel_e        fsel,    // selected sampling frequency
  output logic         heavy,   // heavy-load counter full
  output logic         light    // light-load counter full
);

  load_counter #(.W(CNT_W)) u_hi (
    .clk, .rst_n,
    .en    (~a[HI_TAP]),
    .clr   (a[HI_TAP]),
    .count (),
    .full  (heavy)
  );

  load_counter #(.W(CNT_W)) u_lo (
    .clk, .rst_n,
    .en    (a[LO_TAP]),
    .clr   (~a[LO_TAP]),
    .count (),
    .full  (light)
  );

  // With a thermometer word at least one of the two conditions is false
  // in every cycle, so the two counters are never full together.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(heavy && light))
    else $error("heavy and light load detected together");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      fsel <= F_NOMINAL;
    else if (heavy)
      fsel <= F_HIGH;
    else if (light)
      fsel <= F_LOW;
    else
      fsel <= F_NOMINAL;
  end

endmodule
