`timescale 1ps/1ps
// test_slice: one slice of the test chain, configured to judge the set of
// paths that arrives at it and to launch the next set.
//
// LUT F computes First_i, which switches as soon as any of the four incoming
// lines has switched; LUT G computes Last_i, which switches only once all of
// them have. First_i leaves the slice, runs through a feedback delay and
// comes back as Clock_i. So the flip-flops sample at t_feedback after the
// earliest arrival, and a race is run between Clock_i and Last_i:
//   - every line arrived within t_feedback: X and Y both take their new
//     value, the Pass Signal Transition (PST), {Q_X,Q_Y} = 10 in phase A;
//   - some line is later than that (or never switches): only X switches,
//     the Fail Signal Transition (FST), {Q_X,Q_Y} = 11 in phase A.
// An FST at the input of the next slice makes First switch and Last stay,
// so a failure is passed on down the chain and the flip-flops keep a record
// of where it began.
//
// Phase A (configuration A): First = X1|X2|~Y1|~Y2, Last = ~X1|~X2|Y1|Y2,
// rising-edge clock, Q_X init 0, Q_Y init 1.
// Phase B (configuration B): First = X1&X2&~Y1&~Y2, Last = ~X1&~X2&Y1&Y2,
// falling-edge clock, Q_X init 1, Q_Y init 0.
// These follow the two published configurations; the use of two paths of
// each polarity per set (four LUT inputs) is this design's reading of a set
// of four paths. The outputs Q_X and Q_Y drive the X and Y lines of the next
// set respectively.
//
// `phase` is a configuration value: change it while `gsr` is low and then
// raise `gsr`, whose rising edge loads the phase's init values.
module test_slice
  import fdt_pkg::*;
(
  input  test_phase_e          phase,
  input  logic                 gsr,
  input  logic [X_PER_SET-1:0] x_in,       // X1, X2
  input  logic [X_PER_SET-1:0] y_in,       // Y1, Y2
  input  logic                 clock_in,   // Clock_i, First_i after the feedback delay
  output logic                 first_out,  // First_i, to the feedback delay
  output logic                 last_out,   // Last_i (observation only)
  output logic                 qx,         // drives the X lines of the next set
  output logic                 qy          // drives the Y lines of the next set
);
  logic [LUT_INPUTS-1:0] lut_in;
  qpair_t                init_q;

  assign lut_in = {y_in[1], y_in[0], x_in[1], x_in[0]};
  assign init_q = q_before_test(phase);

  fpga_slice u_slice (
    .f_in    (lut_in),
    .g_in    (lut_in),
    .f_init  (first_lut(phase)),
    .g_init  (last_lut(phase)),
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
