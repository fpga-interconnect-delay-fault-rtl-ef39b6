`timescale 1ps/1ps
// tb_fdt_chain: end-to-end test of the configured test chain at its
// default size (starter block + 8 slices, 500 ps paths, 1020 ps feedback
// loops). Each case configures the chain (phase, injected routing
// defects), applies the single input transition, waits for the chain to
// settle and checks:
//   - the output pin: one transition (falling in phase A, rising in phase
//     B) at exactly 9 * 1020 + 8 * 500 ps after the input when the chain
//     passes (plus, per set, the smallest defect delay on its wires, since
//     the earliest wire clocks the slice), none when it fails;
//   - the readback: PST in every slice before the failing set, not PST at
//     the failing set, FST from there on when the fault is a late line;
//   - the localizer: fail_found and fail_set.
// Cases, in both phases: fault-free, resistive opens below and above the
// feedback delay on each kind of line, stuck-at-0, stuck-at-1, stuck-open,
// wired-AND and wired-OR bridges, two faulty sets at once, and slow-to-rise
// and slow-to-fall defects, which only the phase driving that edge catches.
// A random campaign then adds small defects on every wire (which must pass)
// and single random faults at random places (which must be localised). The phase is
// switched between the two halves (partial reconfiguration). Each mechanism
// is counted and one that never happened counts as a failure.
module tb_fdt_chain;
  import fdt_pkg::*;
  localparam int N      = 8;
  localparam int TPATH  = 500;
  localparam int TFB    = 1020;
  localparam int LAT    = (N + 1) * TFB + N * TPATH;

  test_phase_e  phase;
  logic         cfg, test_in, test_out, fail_found;
  line_defect_t defects [N][PATHS_PER_SET];
  qpair_t       readback [N+1];
  qpair_t       syndrome [N+1];
  logic [3:0]   fail_set;

  int checks = 0, failures = 0;
  int n_pass = 0, n_small_defect_pass = 0, n_delay_fail = 0, n_fst_propagated = 0;
  int n_stuck0 = 0, n_stuck1 = 0, n_stuck_open = 0, n_bridge_and = 0, n_bridge_or = 0;
  int n_phase_switch = 0, n_localized = 0, n_edge_caught = 0, n_edge_missed = 0;

  fdt_chain dut (.*);

  time t_in, t_out;
  int  extra_lat = 0;   // sum over sets of the smallest defect: the earliest wire sets the pace
  logic out_moved;
  always @(test_out) if (!cfg) begin
    out_moved = 1'b1;
    t_out = $time;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (phase %s) at %0t", what, phase.name(), $time);
    end
  endtask

  task automatic clear_defects();
    for (int s = 0; s < N; s++)
      for (int k = 0; k < PATHS_PER_SET; k++) defects[s][k] = LINE_GOOD;
  endtask

  // Configure, apply the transition, wait for the chain.
  task automatic run_test(input test_phase_e ph);
    cfg = 0; #100;
    if (ph != phase) n_phase_switch++;
    phase   = ph;
    test_in = (ph == PHASE_A) ? 1'b0 : 1'b1;
    #100 cfg = 1;
    #5000 cfg = 0;
    #200;
    out_moved = 1'b0;
    t_in = $time;
    test_in = ~test_in;
    #(LAT + 20000);
  endtask

  // Expect a pass of the whole chain.
  task automatic expect_pass(input string what);
    check(out_moved, {what, ": output transition"});
    check(t_out - t_in == LAT + extra_lat,
          $sformatf("%s: latency %0t ps, expected %0d", what, t_out - t_in, LAT + extra_lat));
    check(test_out == ((phase == PHASE_A) ? 1'b0 : 1'b1), {what, ": output level"});
    for (int i = 0; i <= N; i++)
      check(readback[i] == q_pst(phase), $sformatf("%s: readback %0d", what, i));
    check(!fail_found, {what, ": no failure reported"});
  endtask

  // Expect failure localised at set `s`; late=1 if FST must fill the rest.
  task automatic expect_fail(input int s, input logic late, input string what);
    check(!out_moved, {what, ": output must not move"});
    for (int i = 0; i < s; i++)
      check(readback[i] == q_pst(phase), $sformatf("%s: readback %0d is PST", what, i));
    check(readback[s] != q_pst(phase), $sformatf("%s: readback %0d not PST", what, s));
    check(fail_found && fail_set == 4'(s), $sformatf("%s: localised at %0d (got %0d)", what, s, fail_set));
    if (fail_found && fail_set == 4'(s)) n_localized++;
    if (late) begin
      logic all_fst;
      all_fst = 1'b1;
      for (int i = s; i <= N; i++) all_fst &= (readback[i] == q_fst(phase));
      check(all_fst, {what, ": FST from failing set to the end"});
      if (all_fst && s < N) n_fst_propagated++;
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = PHASE_A; cfg = 1; test_in = 0;
    clear_defects();
    for (int p = 0; p < 2; p++) begin
      test_phase_e ph;
      ph = test_phase_e'(p);

      clear_defects();
      run_test(ph);
      expect_pass("fault-free");
      n_pass++;

      // resistive opens below threshold on each line of a set
      for (int k = 0; k < PATHS_PER_SET; k++) begin
        clear_defects();
        defects[2][k].defect_ps = 16'(TFB - 120);
        run_test(ph);
        expect_pass($sformatf("defect %0d ps on line %0d of set 3", TFB - 120, k));
        n_small_defect_pass++;
      end

      // resistive opens above threshold
      for (int k = 0; k < PATHS_PER_SET; k++) begin
        int s;
        s = 1 + (k + 2 * p) % N;   // set s lies between slice s-1 and slice s
        clear_defects();
        defects[s-1][k].defect_ps = 16'(TFB + 150);
        run_test(ph);
        expect_fail(s, 1'b1, $sformatf("defect %0d ps on line %0d of set %0d", TFB + 150, k, s));
        n_delay_fail++;
      end

      // a defect on one edge direction only: caught in the phase that
      // drives that edge on the line, passed in the other
      for (int e = 1; e < 3; e++) begin
        int  line;
        logic caught;
        line = (e == 1) ? 0 : 1;   // slow-to-rise on X1, slow-to-fall on Y1
        clear_defects();
        defects[3][line].defect_ps   = 16'(TFB + 300);
        defects[3][line].defect_edge = defect_edge_e'(e);
        run_test(ph);
        caught = (ph == PHASE_A);  // phase A: X rises, Y falls
        if (caught) expect_fail(4, 1'b1, $sformatf("%s defect on line %0d of set 4", defect_edge_e'(e), line));
        else        expect_pass($sformatf("%s defect on line %0d of set 4", defect_edge_e'(e), line));
        if (caught) n_edge_caught++; else n_edge_missed++;
      end

      // stuck-at and stuck-open
      for (int f = 1; f < 4; f++) begin
        clear_defects();
        defects[4][(f + p) % 4].fault = line_fault_e'(f);
        run_test(ph);
        expect_fail(5, 1'b0, $sformatf("%s on line %0d of set 5", line_fault_e'(f), (f + p) % 4));
        case (f)
          1: n_stuck0++;
          2: n_stuck1++;
          default: n_stuck_open++;
        endcase
      end

      // bridges between a Y line and an X line
      for (int b = 1; b < 3; b++) begin
        clear_defects();
        defects[6][1].bridge_up = bridge_e'(b);   // Y1 to X2 of set 7
        run_test(ph);
        expect_fail(7, 1'b0, $sformatf("%s bridge in set 7", bridge_e'(b)));
        if (b == 1) n_bridge_and++; else n_bridge_or++;
      end

      // two faulty sets: the first is reported
      clear_defects();
      defects[1][0].defect_ps = 16'(3000);
      defects[5][3].fault     = STUCK_AT_0;
      run_test(ph);
      expect_fail(2, 1'b0, "two faulty sets");
    end

    // random campaign: many small defects that must pass, and one random
    // fault at a random place that must be localised
    for (int n = 0; n < 40; n++) begin
      test_phase_e ph;
      ph = test_phase_e'(n % 2);
      clear_defects();
      for (int s = 0; s < N; s++)
        for (int k = 0; k < PATHS_PER_SET; k++)
          defects[s][k].defect_ps = 16'($urandom_range(TFB - 60));
      if (n % 4 < 2) begin
        extra_lat = 0;
        for (int s = 0; s < N; s++) begin
          int m;
          m = 65535;
          for (int k = 0; k < PATHS_PER_SET; k++)
            if (int'(defects[s][k].defect_ps) < m) m = int'(defects[s][k].defect_ps);
          extra_lat += m;
        end
        run_test(ph);
        expect_pass("random small defects");
        extra_lat = 0;
        n_small_defect_pass++;
      end else begin
        int s, k, kind;
        s    = $urandom_range(N, 1);
        k    = $urandom_range(PATHS_PER_SET - 1);
        kind = $urandom_range(5);
        case (kind)
          0, 1: begin
            // late by more than t_feedback against the earliest other wire
            int m;
            m = 65535;
            for (int j = 0; j < PATHS_PER_SET; j++)
              if (j != k && int'(defects[s-1][j].defect_ps) < m) m = int'(defects[s-1][j].defect_ps);
            defects[s-1][k].defect_ps = 16'(m + TFB + 100 + $urandom_range(2000));
          end
          2:    defects[s-1][k].fault = STUCK_AT_0;
          3:    defects[s-1][k].fault = STUCK_AT_1;
          4:    defects[s-1][k].fault = STUCK_OPEN;
          default: defects[s-1][(k < 3) ? k : 2].bridge_up = ($urandom_range(1) != 0) ? WIRED_AND : WIRED_OR;
        endcase
        run_test(ph);
        expect_fail(s, 1'b0, $sformatf("random fault kind %0d line %0d set %0d", kind, k, s));
      end
    end

    check(n_pass > 0,              "mechanism: fault-free pass");
    check(n_small_defect_pass > 0, "mechanism: below-threshold defect passes");
    check(n_delay_fail > 0,        "mechanism: above-threshold defect fails");
    check(n_fst_propagated > 0,    "mechanism: FST propagated down the chain");
    check(n_stuck0 > 0,            "mechanism: stuck-at-0");
    check(n_stuck1 > 0,            "mechanism: stuck-at-1");
    check(n_stuck_open > 0,        "mechanism: stuck-open");
    check(n_bridge_and > 0,        "mechanism: wired-AND bridge");
    check(n_bridge_or > 0,         "mechanism: wired-OR bridge");
    check(n_phase_switch > 0,      "mechanism: phase A/B reconfiguration");
    check(n_localized > 0,         "mechanism: fault localisation");
    check(n_edge_caught > 0,       "mechanism: one-edge defect caught in its phase");
    check(n_edge_missed > 0,       "mechanism: one-edge defect passes the other phase");
    $display("mechanisms: pass=%0d small_defect=%0d delay_fail=%0d fst_prop=%0d sa0=%0d sa1=%0d sopen=%0d and=%0d or=%0d phase_switch=%0d localized=%0d edge_caught=%0d edge_missed=%0d",
             n_pass, n_small_defect_pass, n_delay_fail, n_fst_propagated, n_stuck0, n_stuck1,
             n_stuck_open, n_bridge_and, n_bridge_or, n_phase_switch, n_localized, n_edge_caught, n_edge_missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
