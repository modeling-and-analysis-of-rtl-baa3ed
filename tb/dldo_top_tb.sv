// End-to-end testbench of the digital LDO at its default sizes (128 PMOS
// devices, taps 80/40, 10-bit counters, 33/100/300 MHz clocks), closing the
// loop through a load_grid model (V_IN = 1 V, V_REF = 0.7 V, C_L = 1 nF,
// 50 uA per device at 0.3 V dropout).
//
// Load sequence: nominal (3 mA, about 60 devices) -> heavy (5 mA, about 100
// devices, above tap 80) -> light (0.5 mA, about 10 devices, below tap 40)
// -> nominal, with a pull-down noise pulse that makes a ~200 mV droop in the
// heavy and light phases, and the programmable gain set to 3, 2 and 1.
//
// Checked:
//   * integrator: every sampling edge moves the number of devices on by the
//     amount Table I gives for the previous ADC code and gain (clamped at
//     0 and 128), computed here from the code, not read from the design;
//   * adaptation: F_HIGH under heavy load, F_LOW under light load, F_NOMINAL
//     otherwise, each reached within 1024 + margin cycles, and the measured
//     sampling period matches the selected frequency;
//   * regulation: the average of V_OUT over the end of each phase is within
//     30 mV of V_REF and the number of devices on matches the load current;
//   * recovery: V_OUT comes back above V_REF - D2 after each droop.
// Every mechanism (four shift rows, shift amounts 1..3, both saturation
// conditions of the counters, each frequency switch, droop recovery) is
// counted and must occur at least once.
`timescale 1ns / 1ps
module dldo_top_tb;
  import dldo_pkg::*;

  localparam real VIN = 1.0, VREF = 0.7, D1 = 0.01, D2 = 0.03;
  localparam real CL  = 1.0e-9;

  logic        rst_n, osc_en;
  logic [1:0]  k;
  real         vout, iout, r_load, i_noise;
  logic [127:0] pmos_gate;
  logic [7:0]  n_on;
  logic [2:0]  adc_code;
  fsel_e       fsel;
  logic        heavy, light, clk_s;

  int checks = 0, failures = 0;

  dldo_top dut (
    .rst_n, .osc_en, .k,
    .vin (VIN), .vref (VREF), .delta1 (D1), .delta2 (D2),
    .vout, .iout, .pmos_gate, .n_on, .adc_code, .fsel, .heavy, .light, .clk_s
  );

  load_grid #(.DT_NS(0.05)) u_load (
    .i_in (iout), .r_load, .c_load (CL), .i_noise, .vout
  );

  // ---------------------------------------------------------------------
  // Mechanism counters.
  int n_row000 = 0, n_row001 = 0, n_row011 = 0, n_row111 = 0;
  int n_amount [4];
  int n_to_high = 0, n_to_low = 0, n_to_nom = 0, n_recover = 0;
  int n_edges = 0;

  // Integrator check on every sampling edge.
  logic [2:0] code_prev;
  logic [1:0] k_prev;
  int         d_prev;
  bit         track = 1'b0;
  fsel_e      fsel_prev;
  realtime    t_last_edge = 0;
  fsel_e      fsel_at_edge;

  function automatic int table_shift(logic [2:0] c, logic [1:0] g);
    int gain = 2 * int'(g[1]) + int'(g[0]);
    case (c)
      3'b000:  return  gain;
      3'b001:  return  1;
      3'b011:  return -1;
      3'b111:  return -gain;
      default: return  0;
    endcase
  endfunction

  function automatic logic [2:0] thermo_code(real v);
    if (v > VREF + D1) return 3'b111;
    if (v > VREF - D1) return 3'b011;
    if (v > VREF - D2) return 3'b001;
    return 3'b000;
  endfunction

  function automatic bit near_thr(real v);
    real t [3] = '{VREF + D1, VREF - D1, VREF - D2};
    foreach (t[i]) if (v - t[i] < 0.001 && t[i] - v < 0.001) return 1'b1;
    return 1'b0;
  endfunction

  function automatic real expect_period(fsel_e s);
    case (s)
      F_HIGH:  return 1000.0 / 300.0;
      F_LOW:   return 30.0;
      default: return 10.0;
    endcase
  endfunction

  always @(posedge clk_s) begin
    realtime now;
    fsel_e   sel_before;
    real     v_edge;
    now = $realtime;
    v_edge = vout;
    sel_before = fsel;   // the selection this edge's clock period was started with
    if (track) begin
      int want, amt;
      want = d_prev + table_shift(code_prev, k_prev);
      if (want > 128) want = 128;
      if (want < 0) want = 0;
      #0.01;
      checks++;
      if (int'(n_on) != want) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0t n_on=%0d expected %0d", $time, n_on, want);
      end
      // ADC: the code latched at this edge is the thermometer code of V_OUT
      // (skipped within 1 mV of a threshold, where the grid model's update
      // step and the clock edge can fall in either order).
      if (!near_thr(v_edge)) begin
        checks++;
        if (adc_code !== thermo_code(v_edge)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0t V_OUT=%f code=%b", $time, v_edge, adc_code);
        end
      end
      amt = table_shift(code_prev, k_prev);
      amt = amt < 0 ? -amt : amt;
      n_amount[amt]++;
      case (code_prev)
        3'b000: n_row000++;
        3'b001: n_row001++;
        3'b011: n_row011++;
        3'b111: n_row111++;
        default: ;
      endcase
      // Period of the previous cycle against the selection it ran with.
      checks++;
      if ((now - t_last_edge) - expect_period(fsel_at_edge) > 0.01 ||
          expect_period(fsel_at_edge) - (now - t_last_edge) > 0.01) begin
        failures++;
        $display("FAIL period %f with %s", now - t_last_edge, fsel_at_edge.name());
      end
      if (fsel != fsel_prev) begin
        if (fsel == F_HIGH) n_to_high++;
        else if (fsel == F_LOW) n_to_low++;
        else n_to_nom++;
      end
    end else begin
      #0.01;
    end
    n_edges++;
    // The clock generator sampled fsel at this edge, before the selection
    // register updated, so the coming period runs at the old selection.
    fsel_at_edge = sel_before;
    t_last_edge  = now;
    code_prev    = adc_code;
    k_prev       = k;
    d_prev       = int'(n_on);
    fsel_prev    = fsel;
    track        = rst_n;
  end

  // ---------------------------------------------------------------------
  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Average V_OUT over a window of wall time.
  // The device count must match the load current at that voltage:
  // D = (V/R_L) / ((V_IN - V)/R_ON), within the limit-cycle swing.
  task automatic check_regulation(string phase, real window_ns);
    real   sum;
    int    n;
    real   avg, d_exp;
    int    d_lo, d_hi;
    sum = 0.0;
    n   = 0;
    repeat (int'(window_ns)) begin
      #1;
      sum += vout;
      n++;
    end
    avg = sum / real'(n);
    d_exp = (avg / r_load) / ((VIN - avg) / 6.0e3);
    d_lo = int'(d_exp) - 6;
    d_hi = int'(d_exp) + 6;
    checks++;
    if (avg < VREF - 0.03 || avg > VREF + 0.03) begin
      failures++;
      $display("FAIL %s: average V_OUT %f", phase, avg);
    end
    checks++;
    if (int'(n_on) < d_lo || int'(n_on) > d_hi) begin
      failures++;
      $display("FAIL %s: %0d devices on, expected %0d..%0d", phase, n_on, d_lo, d_hi);
    end
    $display("%s: average V_OUT %f V, %0d devices on, %s", phase, avg, n_on, fsel.name());
  endtask

  task automatic expect_fsel(string phase, fsel_e want);
    checks++;
    if (fsel != want) begin
      failures++;
      $display("FAIL %s: %s selected, expected %s", phase, fsel.name(), want.name());
    end
  endtask

  // Droop: a pull-down pulse, then wait for V_OUT to come back.
  task automatic droop(string phase, real amps, real width_ns, real limit_ns);
    real vmin;
    realtime t0;
    i_noise = amps;
    vmin = vout;
    repeat (int'(width_ns)) begin
      #1;
      if (vout < vmin) vmin = vout;
    end
    i_noise = 0.0;
    t0 = $realtime;
    while (vout < VREF - D2 && $realtime - t0 < limit_ns) begin
      #1;
      if (vout < vmin) vmin = vout;
    end
    checks++;
    if (vout < VREF - D2) begin
      failures++;
      $display("FAIL %s: no recovery from droop", phase);
    end else begin
      n_recover++;
    end
    $display("%s: droop to %f V, recovered after %0.1f ns", phase, vmin, $realtime - t0);
  endtask

  initial begin
    rst_n   = 1'b0;
    osc_en  = 1'b0;
    k       = 2'b11;
    r_load  = 0.7 / 3.0e-3;
    i_noise = 0.0;
    #20;
    checks++;
    if (pmos_gate !== '1 || fsel != F_NOMINAL) begin
      failures++;
      $display("FAIL reset state");
    end
    rst_n  = 1'b1;
    osc_en = 1'b1;

    // Phase 1: nominal load, start-up with gain 3.
    #3000;
    check_regulation("nominal start-up", 1000);
    expect_fsel("nominal start-up", F_NOMINAL);

    // Phase 2: heavy load, gain 2.
    k      = 2'b10;
    r_load = 0.7 / 5.0e-3;
    #(10.0 * 1024 + 3000);
    expect_fsel("heavy", F_HIGH);
    droop("heavy", 40.0e-3, 5, 3000);
    #3000;
    check_regulation("heavy", 1000);
    expect_fsel("heavy", F_HIGH);

    // Phase 3: light load, gain 1.  Bit 80 rises at once (back to
    // nominal), then after 1024 light cycles F_LOW.
    k      = 2'b01;
    r_load = 0.7 / 0.5e-3;
    #(10.0 * 1024 + 15000);
    expect_fsel("light", F_LOW);
    droop("light", 20.0e-3, 10, 10000);
    #10000;
    check_regulation("light", 3000);
    expect_fsel("light", F_LOW);

    // Phase 4: back to nominal load; bit 40 falls, F_NOMINAL again.
    r_load = 0.7 / 3.0e-3;
    #10000;
    check_regulation("nominal again", 1000);
    expect_fsel("nominal again", F_NOMINAL);

    $display("mechanisms: rows 000=%0d 001=%0d 011=%0d 111=%0d, shift by 1/2/3 = %0d/%0d/%0d",
             n_row000, n_row001, n_row011, n_row111, n_amount[1], n_amount[2], n_amount[3]);
    $display("mechanisms: to F_HIGH=%0d to F_LOW=%0d to F_NOMINAL=%0d, droop recoveries=%0d, edges=%0d",
             n_to_high, n_to_low, n_to_nom, n_recover, n_edges);
    if (n_row000 == 0) begin failures++; $display("FAIL never shifted up by gain"); end
    if (n_row001 == 0) begin failures++; $display("FAIL never shifted up by 1"); end
    if (n_row011 == 0) begin failures++; $display("FAIL never shifted down by 1"); end
    if (n_row111 == 0) begin failures++; $display("FAIL never shifted down by gain"); end
    if (n_amount[2] == 0 || n_amount[3] == 0) begin failures++; $display("FAIL gain 2 or 3 unused"); end
    if (n_to_high == 0) begin failures++; $display("FAIL never switched to F_HIGH"); end
    if (n_to_low == 0) begin failures++; $display("FAIL never switched to F_LOW"); end
    if (n_to_nom < 2) begin failures++; $display("FAIL never returned to F_NOMINAL twice"); end
    if (n_recover < 2) begin failures++; $display("FAIL droop recoveries missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
