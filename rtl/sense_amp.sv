// Behavioural model of one clocked sense-amplifier comparator with output
// latch (in the transistor-level design, a clocked differential sense
// amplifier with equalisation, followed by a cross-coupled latch that
// restores and holds the decision).  Not synthesizable: it compares
// real-valued voltages.
//
// On each rising edge of clk the amplifier resolves inp > inm and the latch
// holds that decision until the next rising edge.  The amplifier draws no
// static bias current, which is why it is used instead of a continuous-time
// comparator.  An ideal, offset-free, zero-delay decision is this model's
// simplification.  Asynchronous active-low reset clears the latch.
`timescale 1ns / 1ps
module sense_amp (
  input  logic clk,
  input  logic rst_n,
  input  real  inp,   // positive input
  input  real  inm,   // negative input
  output logic q      // latched decision: 1 when inp > inm at the last edge
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      q <= 1'b0;
    else
      q <= (inp > inm);
  end

endmodule
