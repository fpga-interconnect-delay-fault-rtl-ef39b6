`timescale 1ps/1ps
// starter_block: Slice_0 of the test chain. It turns the one transition the
// tester applies into a pair of opposite transitions on X and Y, so that the
// tester drives a single pin and no skew between tester channels enters the
// measurement.
//
// LUT F passes the tester input through (First_0), LUT G inverts it
// (Last_0). First_0 is routed back into the slice clock (Clock_0). In phase
// A the input rises, the flip-flops (init Q_X=0, Q_Y=1) capture on the
// rising clock and X_1 rises while Y_1 falls. Phase B is the same slice
// with the clock inverted and the init values swapped: the input falls, X_1
// falls and Y_1 rises. The phase B starter is only said to be similar to
// the phase A one; the swap of init values and clock polarity is taken from
// the way configuration B differs from configuration A.
module starter_block
  import fdt_pkg::*;
(
  input  test_phase_e phase,
  input  logic        gsr,
  input  logic        test_in,    // the single tester input
  input  logic        clock_in,   // Clock_0, First_0 routed back
  output logic        first_out,  // First_0, to the clock loop
  output logic        last_out,   // Last_0 (observation only)
  output logic        qx,         // drives the X lines of set 1
  output logic        qy          // drives the Y lines of set 1
);
  qpair_t init_q;

  assign init_q = q_before_test(phase);

  fpga_slice u_slice (
    .f_in    ({3'b000, test_in}),
    .g_in    ({3'b000, test_in}),
    .f_init  (starter_first_lut()),
    .g_init  (starter_last_lut()),
    .clk_in  (clock_in),
    .clk_inv (phase == PHASE_B),
    .qx_init (init_q[1]),
    .qy_init (init_q[0]),
    .gsr     (gsr),
    .f_out   (first_out),
    .g_out   (last_out),
    .qx      (qx),
    .qy      (qy)
  );
endmodule
