// Self-checking testbench for shift_ctrl: applies every ADC code and every
// gain setting and compares d, mux_1, mux_2 with the control table worked
// out here from the shift each case should produce.
`timescale 1ns / 1ps
module shift_ctrl_tb;
  import dldo_pkg::*;

  logic [2:0]  b;
  logic [1:0]  k;
  shift_ctrl_t ctrl;
  int checks = 0, failures = 0;

  shift_ctrl dut (.b, .k, .ctrl);

  // Expected signed shift (positive = up) for a code and a gain.
  function automatic int exp_shift(logic [2:0] code, logic [1:0] gain);
    int g = 2 * int'(gain[1]) + int'(gain[0]);
    case (code)
      3'b000:  return  g;
      3'b001:  return  1;
      3'b011:  return -1;
      3'b111:  return -g;
      default: return  0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ib = 0; ib < 8; ib++) begin
      for (int ik = 0; ik < 4; ik++) begin
        int amount, want;
        b = 3'(ib);
        k = 2'(ik);
        #1;
        amount = 2 * int'(ctrl.mux_1) + int'(ctrl.mux_2);
        want   = exp_shift(b, k);
        checks++;
        if ((want > 0 && !(ctrl.d && amount == want)) ||
            (want < 0 && !(!ctrl.d && amount == -want)) ||
            (want == 0 && amount != 0)) begin
          failures++;
          $display("FAIL b=%b k=%b: d=%b mux_1=%b mux_2=%b, expected shift %0d",
                   b, k, ctrl.d, ctrl.mux_1, ctrl.mux_2, want);
        end
      end
    end
    // Table rows checked literally for the thermometer codes.
    b = 3'b001; k = 2'b11; #1;
    checks++; if (ctrl !== '{1'b1, 1'b0, 1'b1}) failures++;
    b = 3'b011; k = 2'b10; #1;
    checks++; if (ctrl !== '{1'b0, 1'b0, 1'b1}) failures++;
    b = 3'b111; k = 2'b10; #1;
    checks++; if (ctrl !== '{1'b0, 1'b1, 1'b0}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
