// Barrel shifter control generation (Table I).
//
// Maps the 3-bit thermometer code of the flash ADC, b = {B2,B1,B0}, and the
// programmable gain bits k = {k1,k0} onto the shifter controls d, mux_1 and
// mux_2.  The comparator thresholds are, from b[2] down to b[0],
// V_REF+D1, V_REF-D1 and V_REF-D2, and a bit is 1 when V_OUT is above its
// threshold, so:
//   b = 000  V_OUT far below V_REF : shift up   by the programmed gain
//   b = 001  V_OUT slightly below  : shift up   by 1
//   b = 011  V_OUT near V_REF      : shift down by 1
//   b = 111  V_OUT above V_REF+D1  : shift down by the programmed gain
// The gain k = 11/10/01 gives 3/2/1 positions (mux_1 = k1 moves by 2,
// mux_2 = k0 moves by 1); k = 00 gives no shift in the outer rows.
// The four code rows and the gain coding follow the document's control
// table.  Codes that are not thermometer codes (a comparator error) hold the word:
// that case is this design's own choice.
//
// Purely combinational; the shifter registers the result on the next edge.
`timescale 1ns / 1ps
module shift_ctrl
  import dldo_pkg::*;
(
  input  logic [2:0]  b,      // ADC thermometer code {B2,B1,B0}
  input  logic [1:0]  k,      // programmable gain {k1,k0}
  output shift_ctrl_t ctrl    // shifter controls
);

  always_comb begin
    unique case (b)
      3'b000:  ctrl = '{d: 1'b1, mux_1: k[1], mux_2: k[0]};
      3'b001:  ctrl = '{d: 1'b1, mux_1: 1'b0, mux_2: 1'b1};
      3'b011:  ctrl = '{d: 1'b0, mux_1: 1'b0, mux_2: 1'b1};
      3'b111:  ctrl = '{d: 1'b0, mux_1: k[1], mux_2: k[0]};
      default: ctrl = '{d: 1'b0, mux_1: 1'b0, mux_2: 1'b0};
    endcase
  end

endmodule
