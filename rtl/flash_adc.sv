// Behavioural model of the ADC input stage: a 3-comparator flash ADC.
// Not synthesizable (real-valued analog inputs); in silicon each comparator
// is a clocked sense amplifier with a latch.
//
// Three clocked comparators sample V_OUT on the rising clock edge against
//   b[2] : V_REF + D1
//   b[1] : V_REF - D1
//   b[0] : V_REF - D2      (D2 > D1 for a monotonic code)
// and output a thermometer code that encodes the sign and rough size of
// the error V_REF - V_OUT:  000 far below, 001 just below, 011 inside
// +-D1, 111 above.  D1 and D2 are programmable inputs; making D1 very
// small turns the loop into a bang-bang controller, unequal steps give a
// non-linear ADC.  The code is valid right after the rising edge and held
// for one clock period.  Comparator assignment follows the document; the
// comparator polarity (1 = V_OUT above its threshold) is this design's
// reading of the code table.
`timescale 1ns / 1ps
module flash_adc (
  input  logic       clk,     // sampling clock
  input  logic       rst_n,
  input  real        vout,    // sensed output voltage (V)
  input  real        vref,    // reference voltage (V)
  input  real        delta1,  // programmable step D1 (V)
  input  real        delta2,  // programmable step D2 (V)
  output logic [2:0] b        // thermometer code {B2,B1,B0}
);

  real thr [3];

  always_comb begin
    thr[2] = vref + delta1;
    thr[1] = vref - delta1;
    thr[0] = vref - delta2;
  end

  for (genvar i = 0; i < 3; i++) begin : g_cmp
    sense_amp u_sa (
      .clk,
      .rst_n,
      .inp (vout),
      .inm (thr[i]),
      .q   (b[i])
    );
  end

endmodule
