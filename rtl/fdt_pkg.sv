`timescale 1ps/1ps
// fdt_pkg: types and configuration tables shared by the interconnect
// delay-fault test chain.
//
// The chain runs in two test phases. Phase A drives every X path 0->1 and
// every Y path 1->0; phase B drives them the other way. Switching phase is a
// partial reconfiguration of the same slices: the LUT function changes from
// OR-type to AND-type, the flip-flop clock is inverted and the flip-flop
// init values are swapped.
//
// A set of paths between two slices has four lines: two X paths and two Y
// paths. They are numbered in the order in which they lie on a shared bus,
// X1, Y1, X2, Y2, so that neighbouring lines always carry opposite
// polarity and any bridge between neighbours is seen by the test.
//
// LUT input order of a test slice: in[0]=X1, in[1]=X2, in[2]=Y1, in[3]=Y2.
// The LUT tables below are computed from the logic functions rather than
// written as constants.
package fdt_pkg;

  typedef enum logic {
    PHASE_A = 1'b0,   // X rising, Y falling, flip-flops clocked on rising Clock_i
    PHASE_B = 1'b1    // X falling, Y rising, flip-flops clocked on falling Clock_i
  } test_phase_e;

  localparam int unsigned LUT_INPUTS    = 4;
  localparam int unsigned LUT_SIZE      = 1 << LUT_INPUTS;
  localparam int unsigned PATHS_PER_SET = 4;   // two X and two Y paths
  localparam int unsigned X_PER_SET     = PATHS_PER_SET / 2;

  typedef logic [LUT_SIZE-1:0] lut_init_t;

  // One readback entry: {Q_X, Q_Y} of one slice.
  typedef logic [1:0] qpair_t;

  // Fault that can be injected on one line of a set of paths.
  typedef enum logic [1:0] {
    LINE_OK     = 2'd0,
    STUCK_AT_0  = 2'd1,
    STUCK_AT_1  = 2'd2,
    STUCK_OPEN  = 2'd3    // the line keeps the value it had at configuration
  } line_fault_e;

  // Bridge between a bus line and its upper neighbour.
  typedef enum logic [1:0] {
    NO_BRIDGE  = 2'd0,
    WIRED_AND  = 2'd1,
    WIRED_OR   = 2'd2
  } bridge_e;

  // Which transitions of a line a delay defect slows down.
  typedef enum logic [1:0] {
    EDGE_BOTH = 2'd0,
    EDGE_RISE = 2'd1,   // slow-to-rise
    EDGE_FALL = 2'd2    // slow-to-fall
  } defect_edge_e;

  // Everything that can be wrong with one line. defect_ps is the extra
  // delay of a resistive open, in picoseconds, on the edges chosen by
  // defect_edge.
  typedef struct packed {
    logic [15:0]  defect_ps;
    defect_edge_e defect_edge;
    line_fault_e  fault;
    bridge_e      bridge_up;   // bridge to the next line on the bus (ignored on the last)
  } line_defect_t;

  localparam line_defect_t LINE_GOOD =
    '{defect_ps: 16'd0, defect_edge: EDGE_BOTH, fault: LINE_OK, bridge_up: NO_BRIDGE};

  // Readback codes {Q_X, Q_Y}.
  function automatic qpair_t q_before_test(test_phase_e ph);
    return (ph == PHASE_A) ? 2'b01 : 2'b10;
  endfunction

  // Pass Signal Transition: X and Y both took their new value.
  function automatic qpair_t q_pst(test_phase_e ph);
    return (ph == PHASE_A) ? 2'b10 : 2'b01;
  endfunction

  // Fail Signal Transition: X took its new value, Y kept its old one.
  function automatic qpair_t q_fst(test_phase_e ph);
    return (ph == PHASE_A) ? 2'b11 : 2'b00;
  endfunction

  // First_i: changes as soon as any line of the set has switched.
  // Phase A: X1 | X2 | ~Y1 | ~Y2.   Phase B: X1 & X2 & ~Y1 & ~Y2.
  function automatic lut_init_t first_lut(test_phase_e ph);
    lut_init_t t;
    for (int a = 0; a < LUT_SIZE; a++) begin
      logic x1, x2, y1, y2;
      x1 = a[0]; x2 = a[1]; y1 = a[2]; y2 = a[3];
      t[a] = (ph == PHASE_A) ? (x1 | x2 | ~y1 | ~y2) : (x1 & x2 & ~y1 & ~y2);
    end
    return t;
  endfunction

  // Last_i: changes only when every line of the set has switched.
  // Phase A: ~X1 | ~X2 | Y1 | Y2.   Phase B: ~X1 & ~X2 & Y1 & Y2.
  function automatic lut_init_t last_lut(test_phase_e ph);
    lut_init_t t;
    for (int a = 0; a < LUT_SIZE; a++) begin
      logic x1, x2, y1, y2;
      x1 = a[0]; x2 = a[1]; y1 = a[2]; y2 = a[3];
      t[a] = (ph == PHASE_A) ? (~x1 | ~x2 | y1 | y2) : (~x1 & ~x2 & y1 & y2);
    end
    return t;
  endfunction

  // Starter block: First_0 follows the tester input, Last_0 is its inverse.
  // Only LUT input 0 is used.
  function automatic lut_init_t starter_first_lut();
    lut_init_t t;
    for (int a = 0; a < LUT_SIZE; a++) t[a] = a[0];
    return t;
  endfunction

  function automatic lut_init_t starter_last_lut();
    lut_init_t t;
    for (int a = 0; a < LUT_SIZE; a++) t[a] = ~a[0];
    return t;
  endfunction

endpackage
