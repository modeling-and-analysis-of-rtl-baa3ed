// Workload testbench: the regulation loop without adaptation, swept over
// sampling frequencies of 1 MHz, 10 MHz, 100 MHz and 1 GHz at a fixed
// 3.5 mA load, gain 1.  The flash ADC, control decoder, barrel shifter and
// PMOS bank are wired as in the regulator, but clocked from this testbench,
// so the frequency can be set outside the three steps of the on-chip clock
// generator.  At each frequency the loop is started from reset and
// settled; the testbench measures the steady-state peak-to-peak ripple,
// then steps the load to 5 mA and measures the droop and the time until
// the output has recovered 90 % of it.
// Checked: regulation (average within 30 mV of V_REF) and recovery at every
// frequency, and settling time that shrinks as the sampling rate rises.
`timescale 1ns / 1ps
module fsweep_tb;
  import dldo_pkg::*;

  localparam real VIN = 1.0, VREF = 0.7, D1 = 0.01, D2 = 0.03;
  localparam real CL = 1.0e-9;
  localparam int  NF = 4;
  localparam real PERIOD_NS [NF] = '{1000.0, 100.0, 10.0, 1.0};

  logic         clk = 1'b0;
  logic         rst_n;
  logic [2:0]   b;
  shift_ctrl_t  ctrl;
  logic [127:0] gate;
  logic [7:0]   n_on;
  int unsigned  d_on;
  real          vout, iout, r_load, i_noise;
  real          half_ns;
  bit           run = 1'b0;

  int checks = 0, failures = 0;
  real settle [NF];

  flash_adc u_adc (.clk, .rst_n, .vout, .vref (VREF), .delta1 (D1), .delta2 (D2), .b);
  shift_ctrl u_ctrl (.b, .k (2'b01), .ctrl);
  barrel_shifter u_sh (.clk, .rst_n, .ctrl, .a_q (gate), .n_on);
  pmos_dac u_dac (.gate, .vin (VIN), .vout, .iout, .d_on);
  load_grid #(.DT_NS(0.05)) u_load (.i_in (iout), .r_load, .c_load (CL), .i_noise, .vout);

  initial begin
    forever begin
      if (!run) @(posedge run);
      #(half_ns) clk = 1'b1;
      #(half_ns) clk = 1'b0;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_load  = 0.7 / 3.5e-3;
    i_noise = 0.0;
    for (int f = 0; f < NF; f++) begin
      real avg, vmin, vmax, vlow, t_per;
      bit  done;
      int  n;
      realtime t0;
      t_per = PERIOD_NS[f];
      half_ns = t_per / 2.0;
      run = 1'b0;
      rst_n = 1'b0;
      force u_load.vout = VREF;
      #20;
      release u_load.vout;
      rst_n = 1'b1;
      run = 1'b1;
      // Settle: 300 sampling periods, at least 5 us.
      #((300.0 * t_per > 5000.0) ? 300.0 * t_per : 5000.0);
      avg = 0.0; vmin = 10.0; vmax = -10.0; n = 0;
      repeat (int'((40.0 * t_per > 2000.0) ? 40.0 * t_per : 2000.0)) begin
        #1;
        avg += vout;
        if (vout < vmin) vmin = vout;
        if (vout > vmax) vmax = vout;
        n++;
      end
      avg /= real'(n);
      checks++;
      if (avg < VREF - 0.03 || avg > VREF + 0.03) begin
        failures++;
        $display("FAIL %0.0f MHz: average V_OUT %f", 1000.0 / t_per, avg);
      end
      // Load step 3.5 mA -> 5 mA, held: the loop must turn on more devices.
      r_load = 0.7 / 5.0e-3;
      t0 = $realtime;
      vlow = vout;
      done = 1'b0;
      while (!done && $realtime - t0 < 2000.0 * t_per) begin
        #1;
        if (vout < vlow) vlow = vout;
        if (avg - vlow > 0.005 && vout >= vlow + 0.9 * (avg - vlow)) done = 1'b1;
      end
      settle[f] = $realtime - t0;
      checks++;
      if (!done) begin
        failures++;
        $display("FAIL %0.0f MHz: no recovery from the load step", 1000.0 / t_per);
      end
      r_load = 0.7 / 3.5e-3;
      $display("F_SAMPLING %7.1f MHz: V_OUT %f V, ripple %5.1f mV p-p, step droop to %f V, 90%% recovery %0.1f ns",
               1000.0 / t_per, avg, 1000.0 * (vmax - vmin), vlow, settle[f]);
    end
    for (int f = 1; f < NF; f++) begin
      checks++;
      if (settle[f] > settle[f - 1]) begin
        failures++;
        $display("FAIL settling time does not shrink from %0.0f to %0.0f MHz",
                 1000.0 / PERIOD_NS[f - 1], 1000.0 / PERIOD_NS[f]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
