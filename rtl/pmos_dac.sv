// Behavioural model of the current-DAC output stage: a bank of N pull-up
// PMOS devices between V_IN and V_OUT.  Not synthesizable (real-valued
// current output).
//
// Device i is on when gate[i] = 0.  Each device is modelled as a resistor,
// R_ON when on and R_OFF when off, so with D devices on the bank supplies
//   I = (D / R_ON + (N - D) / R_OFF) * (V_IN - V_OUT).
// This is the pull-up conductance the document uses for the output pole;
// the linear device model and the default R_ON, R_OFF values are this
// model's choice (R_ON = 6 kOhm gives 50 uA per device at 0.3 V dropout).
// The output is combinational in gate, vin and vout.
`timescale 1ns / 1ps
module pmos_dac #(
  parameter int unsigned N     = 128,
  parameter real         R_ON  = 6.0e3,   // on resistance of one device (Ohm)
  parameter real         R_OFF = 1.0e9    // off resistance of one device (Ohm)
) (
  input  logic [N-1:0] gate,   // PMOS gates, 0 = on
  input  real          vin,    // supply (V)
  input  real          vout,   // regulated output (V)
  output real          iout,   // current into the output node (A)
  output int unsigned  d_on    // number of devices on
);

  assign d_on = N - $countones(gate);

  always_comb
    iout = (real'(d_on) / R_ON + real'(N - d_on) / R_OFF) * (vin - vout);

endmodule
