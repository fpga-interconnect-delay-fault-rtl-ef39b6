`timescale 1ps/1ps
// path_set: behavioural model, not synthesizable logic. It stands for the
// set of four interconnect paths under test between one slice and the next:
// wire segments, vias, switch points and switch matrices that the test
// configuration routes from the flip-flops of slice i-1 to the LUTs of
// slice i.
//
// Q_X of the driving slice fans out onto the two X lines and Q_Y onto the
// two Y lines. On the shared bus the lines lie in the order X1, Y1, X2, Y2
// (bus index 0..3), so neighbours always carry opposite values.
//
// Each line has a fault-free delay PATH_DELAY_PS and can be given, through
// the `defect` inputs:
//   - defect_ps: the extra delay of a resistive open. For a segment of
//     capacitance C and a defect of resistance R this is R*C*ln 2
//     (0.5 pF and 2.9 kOhm give about 1 ns). defect_edge applies it to
//     both edges or only to rising (slow-to-rise) or falling
//     (slow-to-fall) ones;
//   - fault: stuck-at-0, stuck-at-1 or stuck-open. A stuck-open line is
//     modelled as keeping the value it had when `cfg` was last high;
//   - bridge_up: a wired-AND or wired-OR bridge to the next line on the bus.
// Bridges act where the lines are driven, stuck faults after them, and the
// delay last. The delay is a transport delay, so every transition arrives,
// however short the gap between two of them.
//
// A stuck-open line is modelled with a latch (`held`) that is transparent
// while `cfg` is high; that latch is intended.
//
// While `cfg` is high (the FPGA being configured) the lines settle after
// 1 ps; the path delays apply from the moment `cfg` goes low.
module path_set
  import fdt_pkg::*;
#(
  parameter int unsigned PATH_DELAY_PS = 500
) (
  input  logic                 cfg,
  input  logic                 qx,                      // Q_X of the driving slice
  input  logic                 qy,                      // Q_Y of the driving slice
  input  line_defect_t         defect [PATHS_PER_SET],  // by bus index X1, Y1, X2, Y2
  output logic [X_PER_SET-1:0] x_out,                   // X1, X2 at the receiving slice
  output logic [X_PER_SET-1:0] y_out                    // Y1, Y2 at the receiving slice
);
  logic [PATHS_PER_SET-1:0] driven;    // values put on the bus lines
  logic [PATHS_PER_SET-1:0] bridged;   // after bridges
  logic [PATHS_PER_SET-1:0] held;      // value kept by a stuck-open line
  logic [PATHS_PER_SET-1:0] faulted;   // after stuck faults
  logic [PATHS_PER_SET-1:0] arrived;   // at the far end

  assign driven = {qy, qx, qy, qx};    // bus index 3..0 = Y2, X2, Y1, X1

  // Each line is ANDed or ORed with every neighbour it is bridged to.
  always_comb begin
    bridged = driven;
    for (int k = 0; k < PATHS_PER_SET - 1; k++) begin
      unique case (defect[k].bridge_up)
        WIRED_AND: begin
          bridged[k]   = bridged[k] & driven[k+1];
          bridged[k+1] = driven[k+1] & bridged[k];
        end
        WIRED_OR: begin
          bridged[k]   = bridged[k] | driven[k+1];
          bridged[k+1] = driven[k+1] | bridged[k];
        end
        default: ;
      endcase
    end
  end

  for (genvar k = 0; k < PATHS_PER_SET; k++) begin : g_line
    // Deliberate latch: the charge a stuck-open line keeps.
    always_latch begin
      if (cfg) held[k] = bridged[k];
    end

    always_comb begin
      unique case (defect[k].fault)
        STUCK_AT_0: faulted[k] = 1'b0;
        STUCK_AT_1: faulted[k] = 1'b1;
        STUCK_OPEN: faulted[k] = held[k];
        default:    faulted[k] = bridged[k];
      endcase
    end

    // 1 ps while configuring, the path delay during a test; the defect
    // delay is added on the edges it applies to.
    int unsigned delay_rise_ps, delay_fall_ps;
    always_comb begin
      delay_rise_ps = PATH_DELAY_PS;
      delay_fall_ps = PATH_DELAY_PS;
      if (defect[k].defect_edge != EDGE_FALL) delay_rise_ps += 32'(defect[k].defect_ps);
      if (defect[k].defect_edge != EDGE_RISE) delay_fall_ps += 32'(defect[k].defect_ps);
      if (cfg) begin
        delay_rise_ps = 1;
        delay_fall_ps = 1;
      end
    end

    // Transport delay: each change starts its own timed process, which
    // samples the value and the delay when the change happens. The first
    // one starts 1 ps after time zero, once the inputs have settled.
    // Because rising and falling edges can have different delays, a later
    // change may arrive before an earlier one; as with transport delay, the
    // earlier change is then dropped. Each process carries a sequence
    // number and writes only if no later-started process has written yet.
    int unsigned n_started = 0;
    int unsigned n_written = 0;

    initial begin
      #1;
      forever begin
        n_started++;
        fork
          begin
            automatic logic        v  = faulted[k];
            automatic int unsigned d  = v ? delay_rise_ps : delay_fall_ps;
            automatic int unsigned id = n_started;
            #(d);
            if (id >= n_written) begin
              arrived[k] = v;
              n_written  = id;
            end
          end
        join_none
        @(cfg or faulted[k]);
      end
    end
  end

  assign x_out = {arrived[2], arrived[0]};
  assign y_out = {arrived[3], arrived[1]};
endmodule
