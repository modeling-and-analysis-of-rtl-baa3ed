// Self-checking testbench for the PMOS bank model: random gate words
// (thermometer and arbitrary) and output voltages; the current must be
// D/R_ON + (N-D)/R_OFF times the dropout, with D the number of zero gates.
`timescale 1ns / 1ps
module pmos_dac_tb;
  localparam int unsigned N = 128;
  localparam real R_ON = 6.0e3, R_OFF = 1.0e9;

  logic [N-1:0] gate;
  real          vin, vout, iout;
  int unsigned  d_on;
  int checks = 0, failures = 0;

  pmos_dac #(.N(N), .R_ON(R_ON), .R_OFF(R_OFF)) dut (.gate, .vin, .vout, .iout, .d_on);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 1.0;
    repeat (1000) begin
      int d;
      real want, err;
      d = 0;
      if ($urandom_range(1)) begin
        int t;
        t = $urandom_range(N);
        for (int i = 0; i < N; i++) gate[i] = (i >= t);
      end else begin
        for (int i = 0; i < N; i++) gate[i] = 1'($urandom_range(1));
      end
      for (int i = 0; i < N; i++) if (gate[i] == 1'b0) d++;
      vout = 0.5 + 0.4 * real'($urandom_range(1000)) / 1000.0;
      #1;
      want = (real'(d) / R_ON + real'(N - d) / R_OFF) * (vin - vout);
      err  = iout - want;
      checks++;
      if (d_on != d || err > 1.0e-12 || err < -1.0e-12) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d/%0d iout=%e expected %e", d_on, d, iout, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
