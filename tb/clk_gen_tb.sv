// Self-checking testbench for the clock generator model.  Measures the
// period of every clock cycle and checks it against 1/300 MHz, 1/100 MHz
// and 1/33.3 MHz for F_HIGH, F_NOMINAL and F_LOW, checks that the high
// phase is half the period (no runt pulse when fsel changes mid-cycle)
// and that the clock stays low while the oscillator is disabled.
`timescale 1ns / 1ps
module clk_gen_tb;
  import dldo_pkg::*;

  logic  en;
  fsel_e fsel;
  logic  clk;
  int checks = 0, failures = 0;
  realtime t_rise, t_prev_rise, t_fall;
  fsel_e sel_at_rise, sel_prev;
  int n_per [3];

  clk_gen dut (.en, .fsel, .clk);

  function automatic real expect_period(fsel_e s);
    case (s)
      F_HIGH:  return 1000.0 / 300.0;
      F_LOW:   return 1000.0 / (100.0 / 3.0);
      default: return 10.0;
    endcase
  endfunction

  function automatic bit near(real a, real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  always @(posedge clk) begin
    t_prev_rise = t_rise;
    sel_prev    = sel_at_rise;
    t_rise      = $realtime;
    sel_at_rise = fsel;
    if (t_prev_rise > 0.0 && en) begin
      checks++;
      n_per[sel_prev]++;
      if (!near(t_rise - t_prev_rise, expect_period(sel_prev))) begin
        failures++;
        $display("FAIL period %f for %s", t_rise - t_prev_rise, sel_prev.name());
      end
    end
  end

  always @(negedge clk) begin
    t_fall = $realtime;
    checks++;
    if (!near(2.0 * (t_fall - t_rise), expect_period(sel_at_rise))) begin
      failures++;
      $display("FAIL high phase %f for %s", t_fall - t_rise, sel_at_rise.name());
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t_rise = 0.0;
    en = 1'b0;
    fsel = F_NOMINAL;
    #50;
    checks++;
    if (clk !== 1'b0) failures++;
    en = 1'b1;
    repeat (20) begin
      #(37.3 + real'($urandom_range(400)));
      fsel = fsel_e'($urandom_range(2));
    end
    @(negedge clk);
    en = 1'b0;
    #200;
    checks++;
    if (clk !== 1'b0) failures++;
    if (n_per[0] == 0 || n_per[1] == 0 || n_per[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
