// Self-checking testbench for barrel_shifter at its full 128-bit width.
// A reference integer D (number of devices on) is updated with the signed
// shift each control word asks for, saturating at 0 and N, and the
// shifter word must equal the thermometer word of D after every edge:
// one shift of up to three positions per cycle.  Random controls, long up
// and down runs (to hit both ends) and the reset value are covered.
`timescale 1ns / 1ps
module barrel_shifter_tb;
  import dldo_pkg::*;

  localparam int unsigned N = N_PMOS;

  logic        clk = 1'b0;
  logic        rst_n;
  shift_ctrl_t ctrl;
  logic [N-1:0] a_q;
  logic [$clog2(N+1)-1:0] n_on;
  int checks = 0, failures = 0;
  int d_ref;
  int hit_top = 0, hit_bottom = 0;

  barrel_shifter #(.N(N), .RESET_ON(5)) dut (.clk, .rst_n, .ctrl, .a_q, .n_on);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] thermo(int d);
    logic [N-1:0] w;
    for (int i = 0; i < N; i++) w[i] = (i >= d);
    return w;
  endfunction

  task automatic step(shift_ctrl_t c);
    int amount;
    ctrl = c;
    @(posedge clk);
    amount = 2 * int'(c.mux_1) + int'(c.mux_2);
    d_ref  = c.d ? d_ref + amount : d_ref - amount;
    if (d_ref > int'(N)) d_ref = N;
    if (d_ref < 0) d_ref = 0;
    if (d_ref == int'(N)) hit_top++;
    if (d_ref == 0) hit_bottom++;
    #1;
    checks++;
    if (a_q !== thermo(d_ref) || int'(n_on) != d_ref) begin
      failures++;
      if (failures < 10)
        $display("FAIL d=%b m1=%b m2=%b: n_on=%0d expected %0d", c.d, c.mux_1,
                 c.mux_2, n_on, d_ref);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl  = '0;
    rst_n = 1'b0;
    #12;
    checks++;
    if (a_q !== thermo(5)) begin
      failures++;
      $display("FAIL reset word");
    end
    d_ref = 5;
    @(negedge clk) rst_n = 1'b1;
    // Climb to the top with gain 3, then further (saturation).
    repeat (50) step('{1'b1, 1'b1, 1'b1});
    // Fall with single steps.
    repeat (20) step('{1'b0, 1'b0, 1'b1});
    // Fall with gain 2 past the bottom.
    repeat (60) step('{1'b0, 1'b1, 1'b0});
    // Random walk.
    repeat (5000) step(shift_ctrl_t'($urandom_range(7)));
    if (hit_top == 0 || hit_bottom == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
