// Testbench model of the supplied digital load and its local grid: a load
// resistance R_L in parallel with the grid capacitance C_L, plus an optional
// pull-down noise current.  The node voltage is integrated with forward
// Euler steps of DT_NS:  C dV/dt = i_in - V/R_L - i_noise.
`timescale 1ns / 1ps
module load_grid #(
  parameter real DT_NS = 0.05,     // integration step (ns)
  parameter real V0    = 0.0       // initial node voltage (V)
) (
  input  real i_in,      // current from the regulator (A)
  input  real r_load,    // load resistance (Ohm)
  input  real c_load,    // grid capacitance (F)
  input  real i_noise,   // extra pull-down current (A)
  output real vout       // node voltage (V)
);
  initial begin
    vout = V0;
    forever begin
      #(DT_NS);
      vout = vout + (i_in - vout / r_load - i_noise) * DT_NS * 1.0e-9 / c_load;
      if (vout < 0.0) vout = 0.0;
    end
  end
endmodule
