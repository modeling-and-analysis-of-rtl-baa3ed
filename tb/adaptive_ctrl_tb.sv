// Self-checking testbench for adaptive_ctrl with its default taps (80, 40)
// and 10-bit counters.  The shifter word is driven as a thermometer code
// whose fill level is held for random run lengths around 1023 cycles; a
// reference counts consecutive heavy (more than 80 devices on) and light
// (at most 40 on) cycles and predicts the registered frequency selection.
// The test also checks the exact latency: F_HIGH appears 1024 edges after a
// heavy load starts (1023 counts to fill, one to register the selection).
`timescale 1ns / 1ps
module adaptive_ctrl_tb;
  import dldo_pkg::*;

  localparam int unsigned N = N_PMOS;
  localparam int FULL = (1 << DEF_CNT_W) - 1;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] a;
  fsel_e        fsel;
  logic         heavy, light;
  int checks = 0, failures = 0;
  int hi_run = 0, lo_run = 0;
  fsel_e exp_fsel;
  int n_high = 0, n_low = 0, n_nom = 0;

  adaptive_ctrl dut (.clk, .rst_n, .a, .fsel, .heavy, .light);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] thermo(int d);
    logic [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = (i >= d);
    return w;
  endfunction

  // One clock with d devices on.
  task automatic cycle(int d);
    logic [N-1:0] w;
    w = thermo(d);
    a = w;
    @(posedge clk);
    // Selection registered from the counters' state before this edge.
    exp_fsel = (hi_run >= FULL) ? F_HIGH : (lo_run >= FULL) ? F_LOW : F_NOMINAL;
    hi_run = w[DEF_HI_TAP] ? 0 : (hi_run < FULL ? hi_run + 1 : FULL);
    lo_run = !w[DEF_LO_TAP] ? 0 : (lo_run < FULL ? lo_run + 1 : FULL);
    #1;
    checks++;
    if (fsel !== exp_fsel) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t d=%0d fsel=%s expected %s", $time, d,
                                  fsel.name(), exp_fsel.name());
    end
    case (fsel)
      F_HIGH:  n_high++;
      F_LOW:   n_low++;
      default: n_nom++;
    endcase
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_high;
    a = thermo(60);
    rst_n = 1'b0;
    #12 rst_n = 1'b1;
    checks++;
    if (fsel !== F_NOMINAL) failures++;
    // Heavy load: exact latency of the switch to F_HIGH.
    first_high = -1;
    for (int c = 1; c <= 1100; c++) begin
      cycle(100);
      if (first_high < 0 && fsel == F_HIGH) first_high = c;
    end
    checks++;
    if (first_high != FULL + 1) begin
      failures++;
      $display("FAIL F_HIGH after %0d cycles, expected %0d", first_high, FULL + 1);
    end
    // A single light-ish cycle breaks the heavy run.
    cycle(60);
    repeat (50) cycle(60);
    // Light load to F_LOW, interrupted once.
    repeat (500) cycle(10);
    cycle(45);
    repeat (1100) cycle(20);
    // Random fill levels held for random runs.
    repeat (40) begin
      int d, len;
      d   = $urandom_range(N);
      len = $urandom_range(1200, 1);
      repeat (len) cycle(d);
    end
    if (n_high == 0 || n_low == 0 || n_nom == 0) begin
      failures++;
      $display("FAIL not every selection seen: high=%0d low=%0d nom=%0d", n_high, n_low, n_nom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
