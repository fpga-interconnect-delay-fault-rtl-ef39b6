`timescale 1ps/1ps
// tb_device_sensitivity: runs the test chain with the average minimum
// feedback delay of six FPGA families (fast speed grade) and checks that
// the detection threshold sits at that delay: a resistive open 20 ps below
// t_feedback passes and one 20 ps above fails, in both phases. With ideal
// flip-flops (no setup or hold time) the largest passing and the smallest
// failing defect both equal t_feedback.
//
// It also converts each family's smallest guaranteed-failing delay into the
// defect resistance on a 0.5 pF segment, R = t / (C * ln 2), and checks it
// against the published value to within 0.05 kOhm, and into the effective
// clock rate of the race, 1 / t, against the published GHz figure.
module tb_device_sensitivity;
  import fdt_pkg::*;
  localparam int ND = 6;
  localparam int N  = 2;
  localparam int TPATH = 500;
  // Spartan-II, Spartan-IIE, Virtex, Virtex-II, Virtex-IIE, Virtex-IIPro
  localparam int TFB      [ND] = '{840, 360, 1020, 970, 370, 790};
  localparam int TMINFAIL [ND] = '{840, 360, 1020, 900, 370, 880};
  localparam real RKOHM   [ND] = '{2.4, 1.0, 2.9, 2.6, 1.1, 2.5};
  localparam real GHZ    [ND] = '{1.19, 2.78, 0.98, 1.11, 2.70, 1.14};
  localparam real CSEG = 0.5e-12;

  test_phase_e phase;
  logic cfg, test_in;
  logic [ND-1:0] test_out, fail_found;
  int margin;
  int checks = 0, failures = 0;

  for (genvar d = 0; d < ND; d++) begin : g_dev
    line_defect_t defects [N][PATHS_PER_SET];
    qpair_t readback [N+1], syndrome [N+1];
    logic [1:0] fail_set;

    always_comb begin
      for (int s = 0; s < N; s++)
        for (int k = 0; k < PATHS_PER_SET; k++) defects[s][k] = LINE_GOOD;
      defects[1][1].defect_ps = 16'(TFB[d] + margin);   // Y1 of set 2
    end

    fdt_chain #(.N_SLICES(N), .PATH_DELAY_PS(TPATH), .FEEDBACK_DELAY_PS(TFB[d])) u_chain (
      .phase, .cfg, .test_in, .defects,
      .test_out (test_out[d]), .readback, .syndrome,
      .fail_found (fail_found[d]), .fail_set
    );
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = PHASE_A; cfg = 0; test_in = 0; margin = 0;
    for (int d = 0; d < ND; d++) begin
      real r;
      r = TMINFAIL[d] * 1.0e-12 / (CSEG * $ln(2.0)) / 1.0e3;
      check(r > RKOHM[d] - 0.05 && r < RKOHM[d] + 0.05,
            $sformatf("device %0d: R_min-fail %.2f kOhm, table %.1f", d, r, RKOHM[d]));
      // effective clock rate of the race: 1 / t_defect_min-fail
      r = 1.0e3 / TMINFAIL[d];
      check(r > GHZ[d] - 0.006 && r < GHZ[d] + 0.006,
            $sformatf("device %0d: Clock_eff %.3f GHz, table %.2f", d, r, GHZ[d]));
    end
    for (int p = 0; p < 2; p++) begin
      for (int m = 0; m < 2; m++) begin
        margin  = (m == 0) ? -20 : 20;
        phase   = test_phase_e'(p);
        test_in = (p == 0) ? 1'b0 : 1'b1;
        #100 cfg = 1;
        #5000 cfg = 0;
        #200 test_in = ~test_in;
        #20000;
        for (int d = 0; d < ND; d++) begin
          if (m == 0) check(!fail_found[d], $sformatf("device %0d phase %0d: %0d ps must pass", d, p, TFB[d] - 20));
          else        check(fail_found[d],  $sformatf("device %0d phase %0d: %0d ps must fail", d, p, TFB[d] + 20));
        end
        check(test_out == ((m == 0) ? {ND{p == 1}} : {ND{p == 0}}), $sformatf("output pins phase %0d margin %0d", p, margin));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
