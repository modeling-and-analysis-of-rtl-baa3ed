// Saturating run-length counter used by the adaptive clock controller.
//
// Counts clock cycles while en is high and returns to zero in any cycle
// where clr is high (clr wins).  When the count reaches all ones it stays
// there and full is raised, so full means "en has been high for at least
// 2**W - 1 consecutive cycles since the last clear".  Holding at all ones
// rather than wrapping is this design's choice.  Asynchronous active-low
// reset.
`timescale 1ns / 1ps
module load_counter #(
  parameter int unsigned W = 10   // counter width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // count this cycle
  input  logic         clr,    // clear this cycle
  output logic [W-1:0] count,
  output logic         full    // count is all ones
);

  assign full = &count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      count <= '0;
    else if (clr)
      count <= '0;
    else if (en && !full)
      count <= count + 1'b1;
  end

endmodule
