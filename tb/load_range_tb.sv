// Workload testbench: the regulator at its default sizes across a 100x load
// range.  For each load current (50 uA, 350 uA, 500 uA, 3.5 mA, 5 mA) the
// design is reset, allowed to settle and adapt, and then hit with a
// pull-down noise pulse sized for a ~200 mV droop.  For each load it checks:
//   * the selected sampling frequency matches the band of the device count
//     (more than 80 devices on -> F_HIGH, at most 40 -> F_LOW, else
//     F_NOMINAL), with the device count worked out from the load current;
//   * the average output is within 30 mV of V_REF, and the number of
//     devices on matches the load current at that voltage;
//   * after the droop the output returns to 90% of its settled value, and
//     the settling time is reported.
// Load currents are given at 0.7 V; R_L = 0.7 V / I.
`timescale 1ns / 1ps
module load_range_tb;
  import dldo_pkg::*;

  localparam real VIN = 1.0, VREF = 0.7, D1 = 0.01, D2 = 0.03;
  localparam real CL = 1.0e-9, R_ON = 6.0e3;
  localparam int  NLOAD = 5;
  localparam real LOADS [NLOAD] = '{50.0e-6, 350.0e-6, 500.0e-6, 3.5e-3, 5.0e-3};

  logic         rst_n, osc_en;
  logic [1:0]   k;
  real          vout, iout, r_load, i_noise;
  logic [127:0] pmos_gate;
  logic [7:0]   n_on;
  logic [2:0]   adc_code;
  fsel_e        fsel;
  logic         heavy, light, clk_s;

  int checks = 0, failures = 0;
  int n_sel [3];
  int n_recover = 0;

  dldo_top dut (
    .rst_n, .osc_en, .k,
    .vin (VIN), .vref (VREF), .delta1 (D1), .delta2 (D2),
    .vout, .iout, .pmos_gate, .n_on, .adc_code, .fsel, .heavy, .light, .clk_s
  );

  load_grid #(.DT_NS(0.05)) u_load (
    .i_in (iout), .r_load, .c_load (CL), .i_noise, .vout
  );

  function automatic real sampling_period(fsel_e s);
    case (s)
      F_HIGH:  return 1000.0 / 300.0;
      F_LOW:   return 30.0;
      default: return 10.0;
    endcase
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    k       = 2'b01;       // nominal gain K = 1
    i_noise = 0.0;
    osc_en  = 1'b0;
    for (int l = 0; l < NLOAD; l++) begin
      real   i_load, d_exp, avg, vmin, v_settled, v_target;
      real   settle_time, droop_amps;
      int    n, d_meas;
      fsel_e want;
      realtime t0;

      i_load = LOADS[l];
      r_load = 0.7 / i_load;
      rst_n  = 1'b0;
      osc_en = 1'b0;
      force u_load.vout = VREF;
      #20;
      release u_load.vout;
      rst_n  = 1'b1;
      osc_en = 1'b1;

      // Settle and adapt: a 1024-cycle window at the slowest clock plus
      // the light-load time constant R_L*C_L.
      #(30.0 * 1024 + 3.0 * r_load * CL * 1.0e9 + 5000.0);

      // Average over a window.
      avg = 0.0;
      n = 0;
      repeat (2000) begin
        #1;
        avg += vout;
        n++;
      end
      avg /= real'(n);
      d_exp = (avg / r_load) / ((VIN - avg) / R_ON);
      want  = (d_exp > 82.0) ? F_HIGH : (d_exp < 38.0) ? F_LOW : F_NOMINAL;
      checks++;
      if (avg < VREF - 0.03 || avg > VREF + 0.03) begin
        failures++;
        $display("FAIL load %e A: average V_OUT %f", i_load, avg);
      end
      checks++;
      if (fsel != want) begin
        failures++;
        $display("FAIL load %e A: %s selected for %0.1f devices, expected %s",
                 i_load, fsel.name(), d_exp, want.name());
      end
      n_sel[fsel]++;
      d_meas = int'(n_on);
      checks++;
      if (real'(d_meas) > d_exp + 8.0 || real'(d_meas) < d_exp - 8.0) begin
        failures++;
        $display("FAIL load %e A: %0d devices on, expected about %0.1f", i_load, d_meas, d_exp);
      end

      // Droop: pull-down pulse of about 200 mV.
      v_settled  = avg;
      droop_amps = 0.2 * CL / 5.0e-9;   // 200 mV in 5 ns on C_L
      i_noise = droop_amps;
      vmin = vout;
      repeat (5) begin
        #1;
        if (vout < vmin) vmin = vout;
      end
      i_noise = 0.0;
      t0 = $realtime;
      v_target = vmin + 0.9 * (v_settled - vmin);
      while (vout < v_target && $realtime - t0 < 200000.0) begin
        #1;
        if (vout < vmin) vmin = vout;
      end
      settle_time = $realtime - t0;
      checks++;
      if (vout < v_target) begin
        failures++;
        $display("FAIL load %e A: no recovery", i_load);
      end else begin
        n_recover++;
      end
      $display("load %8.1f uA: %3d devices on (%0.1f expected), %-9s (T = %5.2f ns), V_OUT %f V, droop to %f V, 90%% settling %0.1f ns",
               i_load * 1.0e6, d_meas, d_exp, fsel.name(), sampling_period(fsel), avg, vmin,
               settle_time);
    end
    if (n_sel[F_LOW] == 0 || n_sel[F_NOMINAL] == 0 || n_sel[F_HIGH] == 0) begin
      failures++;
      $display("FAIL not every frequency selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
