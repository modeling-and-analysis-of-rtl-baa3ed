// Discrete-time digital LDO with adaptive sampling clock.
//
// The regulator closes a sampled loop around the output voltage of a local
// supply grid:
//   flash_adc      samples V_OUT against V_REF on each sampling-clock edge
//                  and gives a 3-bit thermometer error code;
//   shift_ctrl     turns that code and the programmable gain k into a shift
//                  direction and amount (0..3 positions);
//   barrel_shifter integrates the error: its 128-bit thermometer word drives
//                  the gates of the pull-up PMOS bank, one bit per device;
//   pmos_dac       the PMOS bank itself, supplying current from V_IN;
//   adaptive_ctrl  watches shifter bits 80 and 40 and, after ~1024 cycles of
//                  heavy or light load, moves the sampling clock to F_HIGH or
//                  F_LOW, so the sampled output pole exp(-aT) stays within
//                  bounds as the load changes by orders of magnitude;
//   clk_gen        the ring-oscillator clock generator that produces the
//                  selected sampling frequency (33 / 100 / 300 MHz).
// The load and grid (R_L parallel C_L) are outside: vout comes back in as a
// port and iout is the current delivered to it.
//
// Timing: the ADC code sampled at edge n moves the shifter at edge n+1
// (one cycle of loop delay); the frequency selection is registered and takes
// effect at the start of the next sampling period.
//
// The ADC, clock generator and PMOS bank are behavioural models (analog
// parts); shift_ctrl, barrel_shifter and adaptive_ctrl are synthesizable.
// The blocks and their connections follow the document's regulator and
// adaptive-control schematics; the one-cycle loop delay, the observation
// outputs and keeping the load outside the top are this design's choices.
`timescale 1ns / 1ps
module dldo_top
  import dldo_pkg::*;
#(
  parameter int unsigned N        = N_PMOS,
  parameter int unsigned HI_TAP   = DEF_HI_TAP,
  parameter int unsigned LO_TAP   = DEF_LO_TAP,
  parameter int unsigned CNT_W    = DEF_CNT_W,
  parameter int unsigned RESET_ON = 0
) (
  input  logic         rst_n,     // asynchronous reset, active low
  input  logic         osc_en,    // sampling oscillator enable
  input  logic [1:0]   k,         // programmable gain {k1,k0}
  input  real          vin,       // input supply (V)
  input  real          vref,      // reference (V)
  input  real          delta1,    // ADC step D1 (V)
  input  real          delta2,    // ADC step D2 (V)
  input  real          vout,      // sensed output voltage (V)
  output real          iout,      // current delivered to the output (A)
  output logic [N-1:0] pmos_gate, // PMOS gate word, 0 = device on
  output logic [$clog2(N+1)-1:0] n_on, // number of devices on
  output logic [2:0]   adc_code,  // ADC thermometer code
  output fsel_e        fsel,      // selected sampling frequency
  output logic         heavy,     // heavy-load counter full
  output logic         light,     // light-load counter full
  output logic         clk_s      // sampling clock F_SAMPLING
);

  shift_ctrl_t ctrl;
  int unsigned d_on;

  clk_gen u_clk_gen (
    .en   (osc_en),
    .fsel (fsel),
    .clk  (clk_s)
  );

  flash_adc u_adc (
    .clk    (clk_s),
    .rst_n,
    .vout,
    .vref,
    .delta1,
    .delta2,
    .b      (adc_code)
  );

  shift_ctrl u_ctrl (
    .b    (adc_code),
    .k,
    .ctrl
  );

  barrel_shifter #(.N(N), .RESET_ON(RESET_ON)) u_shifter (
    .clk  (clk_s),
    .rst_n,
    .ctrl,
    .a_q  (pmos_gate),
    .n_on
  );

  adaptive_ctrl #(
    .N(N), .HI_TAP(HI_TAP), .LO_TAP(LO_TAP), .CNT_W(CNT_W)
  ) u_adapt (
    .clk   (clk_s),
    .rst_n,
    .a     (pmos_gate),
    .fsel,
    .heavy,
    .light
  );

  pmos_dac #(.N(N)) u_dac (
    .gate (pmos_gate),
    .vin,
    .vout,
    .iout,
    .d_on
  );

  // The PMOS bank must see as many devices on as the shifter reports.
  a_dac_count: assert property (@(posedge clk_s) disable iff (!rst_n)
    d_on == 32'(n_on))
    else $error("PMOS bank and shifter disagree on the device count");

endmodule
