// Behavioural model of the programmable ring-oscillator clock generator.
// Not synthesizable: it uses delays to stand for the inverter chain.
//
// A ring of inverting stages is tapped at three lengths; a multiplexer
// closes the ring at the tap chosen by fsel, giving the sampling clock
// F_SAMPLING = 1 / (2 * stages * STAGE_NS).  The default stage delay and
// tap lengths (10, 30 and 90 stages of 1/6 ns) give F_HIGH = 300 MHz,
// F_NOMINAL = 100 MHz and F_LOW = 33.3 MHz, the three frequencies and the
// 3x spacing used in the document; the stage delay and tap lengths
// themselves are this model's choice.
//
// fsel is sampled once per period, at the start of the high phase, so a
// change of frequency never produces a runt pulse.  While en is low the
// clock is held low.
`timescale 1ns / 1ps
module clk_gen
  import dldo_pkg::*;
#(
  parameter real         STAGE_NS     = 1.0 / 6.0, // delay of one stage (ns)
  parameter int unsigned STAGES_HIGH  = 10,
  parameter int unsigned STAGES_NOM   = 30,
  parameter int unsigned STAGES_LOW   = 90
) (
  input  logic  en,       // oscillator enable
  input  fsel_e fsel,     // selected tap
  output logic  clk       // sampling clock
);
  function automatic real half_period(fsel_e sel);
    case (sel)
      F_HIGH:  return STAGE_NS * real'(STAGES_HIGH);
      F_LOW:   return STAGE_NS * real'(STAGES_LOW);
      default: return STAGE_NS * real'(STAGES_NOM);
    endcase
  endfunction

  real half;

  initial begin
    clk  = 1'b0;
    half = half_period(F_NOMINAL);
    forever begin
      if (!en) begin
        clk = 1'b0;
        wait (en);
      end
      half = half_period(fsel);
      clk  = 1'b1;
      #(half);
      clk  = 1'b0;
      #(half);
    end
  end

endmodule
