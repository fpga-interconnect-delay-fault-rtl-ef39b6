`timescale 1ps/1ps
// fdt_chain: the FPGA configured for an interconnect delay-fault test. A
// starter block (slice 0) and N_SLICES test slices are joined into one chain
// by sets of four interconnect paths; the tester drives one input pin and
// watches one output pin, and afterwards reads back every slice's
// flip-flops.
//
//   test_in -> starter_block -> set 1 -> slice 1 -> set 2 -> ... -> slice N -> test_out
//
// Each slice i >= 1 races Clock_i (its own First_i after FEEDBACK_DELAY_PS)
// against Last_i. If every line of set i arrived within the feedback delay
// of the first one, the slice passes the Pass Signal Transition on;
// otherwise it launches the Fail Signal Transition, which every later slice
// passes on unchanged. Stuck-at and stuck-open lines and bridges between X
// and Y lines make Last_i stay, so they are caught the same way.
//
// Test procedure (one phase):
//   1. with `cfg` low, set `phase` (configuration, or partial
//      reconfiguration between phases) and test_in to its start level, then
//      raise `cfg`: its rising edge loads the flip-flop init values, and
//      while it is high the routing settles; keep it high for longer than
//      FEEDBACK_DELAY_PS;
//   2. drop `cfg`, then apply one transition to test_in: rising in phase A,
//      falling in phase B;
//   3. pass: test_out (Q_Y of slice N) makes one transition, falling in
//      phase A, rising in phase B, after roughly
//      (N_SLICES+1) * FEEDBACK_DELAY_PS + N_SLICES * PATH_DELAY_PS.
//      fail: test_out does not move;
//   4. `readback` holds every slice's {Q_X, Q_Y}; fail_found and fail_set
//      name the first failing set.
//
// The slices and the localizer are synthesizable; path_set and
// feedback_delay are behavioural models of the FPGA routing, so this top is
// a simulation model of the configured device. The routing defects are
// inputs so that a testbench can place faults. The chain, the set of four
// paths and the phase A/B scheme follow the method; N_SLICES, the path delay
// and the use of the same loop delay for the starter block are this
// design's choices.
module fdt_chain
  import fdt_pkg::*;
#(
  parameter int unsigned N_SLICES          = 8,
  parameter int unsigned PATH_DELAY_PS     = 500,
  parameter int unsigned FEEDBACK_DELAY_PS = 1020,
  localparam int unsigned IDX_W            = $clog2(N_SLICES + 1)
) (
  input  test_phase_e  phase,
  input  logic         cfg,
  input  logic         test_in,
  // defects[i-1][k]: line k (X1, Y1, X2, Y2) of set i, between slice i-1 and slice i
  input  line_defect_t defects [N_SLICES][PATHS_PER_SET],
  output logic         test_out,
  output qpair_t       readback [N_SLICES+1],
  output qpair_t       syndrome [N_SLICES+1],
  output logic         fail_found,
  output logic [IDX_W-1:0] fail_set
);
  logic [N_SLICES:0] qx, qy, first, clock;
  logic [X_PER_SET-1:0] x_in [N_SLICES+1];
  logic [X_PER_SET-1:0] y_in [N_SLICES+1];

  starter_block u_starter (
    .phase     (phase),
    .gsr       (cfg),
    .test_in   (test_in),
    .clock_in  (clock[0]),
    .first_out (first[0]),
    .last_out  (),
    .qx        (qx[0]),
    .qy        (qy[0])
  );

  feedback_delay #(.DELAY_PS(FEEDBACK_DELAY_PS)) u_loop0 (.d(first[0]), .q(clock[0]));

  assign x_in[0] = '0;
  assign y_in[0] = '0;

  for (genvar i = 1; i <= N_SLICES; i++) begin : g_slice
    path_set #(.PATH_DELAY_PS(PATH_DELAY_PS)) u_set (
      .cfg    (cfg),
      .qx     (qx[i-1]),
      .qy     (qy[i-1]),
      .defect (defects[i-1]),
      .x_out  (x_in[i]),
      .y_out  (y_in[i])
    );

    test_slice u_slice (
      .phase     (phase),
      .gsr       (cfg),
      .x_in      (x_in[i]),
      .y_in      (y_in[i]),
      .clock_in  (clock[i]),
      .first_out (first[i]),
      .last_out  (),
      .qx        (qx[i]),
      .qy        (qy[i])
    );

    feedback_delay #(.DELAY_PS(FEEDBACK_DELAY_PS)) u_loop (.d(first[i]), .q(clock[i]));
  end

  for (genvar i = 0; i <= N_SLICES; i++) begin : g_rb
    assign readback[i] = {qx[i], qy[i]};
  end

  assign test_out = qy[N_SLICES];

  readback_localizer #(.N_ENTRIES(N_SLICES + 1)) u_loc (
    .phase      (phase),
    .readback   (readback),
    .syndrome   (syndrome),
    .fail_found (fail_found),
    .fail_set   (fail_set)
  );
endmodule
