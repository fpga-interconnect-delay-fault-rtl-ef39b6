`timescale 1ps/1ps
// readback_localizer: finds the failing set of paths from the flip-flop
// values read back after a test.
//
// After a test every slice holds in {Q_X, Q_Y} either the Pass Signal
// Transition, the Fail Signal Transition or, if nothing reached it, its
// init value. A failure is handed on down the chain, so all slices from the
// first failing set onwards differ from the pass code. The readback is
// XORed entry by entry with the pass code of the current phase (10 in phase
// A, 01 in phase B), giving the syndrome; the first non-zero syndrome entry
// is the set of paths into that slice, and no search over several
// configurations is needed.
//
// Entry i is slice i: entry 0 is the starter block, entry i >= 1 judges the
// set of paths between slice i-1 and slice i. Purely combinational; the
// result is valid as soon as the readback is. Doing this XOR and priority
// search in logic, rather than on a host computer, is this design's choice.
module readback_localizer
  import fdt_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 9,
  localparam int unsigned IDX_W    = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1
) (
  input  test_phase_e      phase,
  input  qpair_t           readback [N_ENTRIES],
  output qpair_t           syndrome [N_ENTRIES],
  output logic             fail_found,
  output logic [IDX_W-1:0] fail_set
);
  qpair_t expected;

  assign expected = q_pst(phase);

  always_comb begin
    fail_found = 1'b0;
    fail_set   = '0;
    for (int unsigned i = 0; i < N_ENTRIES; i++) begin
      syndrome[i] = readback[i] ^ expected;
      if (!fail_found && syndrome[i] != 2'b00) begin
        fail_found = 1'b1;
        fail_set   = IDX_W'(i);
      end
    end
  end
endmodule
