// Bidirectional barrel shifter driving the pull-up PMOS gates.
//
// An N-bit register A holds the gate word of the PMOS bank as a thermometer
// code (ones at the top, zeros at the bottom; a 0 turns a device on).  Each
// bit has two levels of 4:1 multiplexing in front of its flip-flop:
//   level 1:  B[n] = A[n-2] (up by 2) | A[n+2] (down by 2) | A[n]   (mux_1)
//   level 2:  F[n] = B[n-1] (up by 1) | B[n+1] (down by 1) | B[n]   (mux_2)
// with the direction d as the second select of both levels, so one clock
// edge moves the word by 0, 1, 2 or 3 positions.  This is the discrete-time
// integrator D(n) = D(n-1) + K*e(n) of the regulator loop, where D is the
// number of devices on.  Positions that fall off the ends are filled with 0
// at the bottom (shifting up) and 1 at the top (shifting down), so a
// thermometer word stays one and saturates at all-on or all-off.
//
// The two-level mux structure and the shift amounts follow the document;
// the end fill, the select encoding and the reset value are this design's
// choices.  Reset (asynchronous, active low) loads RESET_ON devices on.
//
// Timing: the controls are sampled on the rising clock edge; the new word
// is on a_q right after that edge.
`timescale 1ns / 1ps
module barrel_shifter
  import dldo_pkg::*;
#(
  parameter int unsigned N        = N_PMOS, // number of PMOS devices
  parameter int unsigned RESET_ON = 0       // devices on after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  shift_ctrl_t  ctrl,      // shift direction and amount
  output logic [N-1:0] a_q,       // PMOS gate word, 0 = device on
  output logic [$clog2(N+1)-1:0] n_on  // number of devices on (zeros at bottom)
);

  // Word extended by two fill positions at each end.
  logic [N+3:0] a_ext;   // a_ext[i+2] = A[i]
  logic [N+1:0] b_ext;   // b_ext[i+1] = B[i]
  logic [N-1:0] f;       // next value of A

  assign a_ext = {2'b11, a_q, 2'b00};

  // Level 1: move by two positions.  B is computed for N+2 positions so
  // level 2 can read B[-1] and B[N]; those use the same fill rules.
  always_comb begin
    for (int i = 0; i < N + 2; i++) begin
      // b_ext[i] = B[i-1], which reads A[i-1-2], A[i-1+2] or A[i-1]
      if (i == 0)
        b_ext[i] = 1'b0;                  // fill below the word
      else if (i == N + 1)
        b_ext[i] = 1'b1;                  // fill above the word
      else if (!ctrl.mux_1)
        b_ext[i] = a_ext[i + 1];          // A[n]
      else if (ctrl.d)
        b_ext[i] = a_ext[i - 1];          // A[n-2], up
      else
        b_ext[i] = a_ext[i + 3];          // A[n+2], down
    end
  end

  // Level 2: move by one position.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (!ctrl.mux_2)
        f[i] = b_ext[i + 1];              // B[n]
      else if (ctrl.d)
        f[i] = b_ext[i];                  // B[n-1], up
      else
        f[i] = b_ext[i + 2];              // B[n+1], down
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= {N{1'b1}} << RESET_ON;
    end else begin
      a_q <= f;
    end
  end

  // Count of devices on, for observation (number of zero bits).
  always_comb begin
    n_on = '0;
    for (int i = 0; i < N; i++)
      n_on = n_on + {{($bits(n_on) - 1){1'b0}}, ~a_q[i]};
  end

  // The word is always a thermometer code: the n_on devices that are on
  // are the bottom ones.
  a_thermometer: assert property (@(posedge clk) disable iff (!rst_n)
    a_q == ({N{1'b1}} << n_on))
    else $error("shifter word is not a thermometer code");

endmodule
