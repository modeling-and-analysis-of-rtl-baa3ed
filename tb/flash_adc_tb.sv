// Self-checking testbench for the flash ADC model.  Random output voltages
// around a 0.7 V reference are applied between clock edges; after each
// rising edge the code must be the thermometer code of V_OUT against
// V_REF+D1, V_REF-D1 and V_REF-D2, and it must hold while V_OUT moves
// between edges (sampled, not continuous, comparison).
`timescale 1ns / 1ps
module flash_adc_tb;
  logic       clk = 1'b0;
  logic       rst_n;
  real        vout, vref, delta1, delta2;
  logic [2:0] b;
  int checks = 0, failures = 0;
  int seen [8];

  flash_adc dut (.clk, .rst_n, .vout, .vref, .delta1, .delta2, .b);

  always #5 clk = ~clk;

  function automatic logic [2:0] expect_code(real v);
    if (v > vref + delta1) return 3'b111;
    if (v > vref - delta1) return 3'b011;
    if (v > vref - delta2) return 3'b001;
    return 3'b000;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] want;
    vref = 0.7; delta1 = 0.01; delta2 = 0.03; vout = 0.0;
    rst_n = 1'b0;
    #2;
    checks++;
    if (b !== 3'b000) failures++;
    rst_n = 1'b1;
    repeat (2000) begin
      @(negedge clk);
      vout = 0.6 + 0.2 * real'($urandom_range(10000)) / 10000.0;
      if ($urandom_range(3) == 0) begin
        delta1 = 0.002 + 0.02 * real'($urandom_range(100)) / 100.0;
        delta2 = delta1 + 0.05 * real'($urandom_range(100)) / 100.0;
      end
      want = expect_code(vout);
      @(posedge clk);
      #1;
      checks++;
      seen[want]++;
      if (b !== want) begin
        failures++;
        if (failures < 10) $display("FAIL vout=%f code=%b expected %b", vout, b, want);
      end
      // Move V_OUT before the next edge: the code must not follow.
      vout = (want == 3'b111) ? 0.0 : 1.0;
      #2;
      checks++;
      if (b !== want) failures++;
    end
    if (seen[0] == 0 || seen[1] == 0 || seen[3] == 0 || seen[7] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
