`timescale 1ps/1ps
// tb_readback_localizer: self-checking test of the result localizer. It
// builds readbacks the way a chain produces them (PST up to a failing
// set, then FST or untouched init codes), plus the example of the method
// (phase A, all 10 before set i, 11 from set i on, syndrome 00 .. 01 ..),
// plus random readbacks, and compares syndrome, fail_found and fail_set
// with a reference computed here.
module tb_readback_localizer;
  import fdt_pkg::*;
  localparam int N = 9;

  test_phase_e phase;
  qpair_t readback [N];
  qpair_t syndrome [N];
  logic fail_found;
  logic [3:0] fail_set;
  int checks = 0, failures = 0;

  readback_localizer #(.N_ENTRIES(N)) dut (.*);

  task automatic check_all();
    logic [1:0] pass_code;
    int first;
    pass_code = (phase == PHASE_A) ? 2'b10 : 2'b01;
    first = -1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (syndrome[i] !== (readback[i] ^ pass_code)) begin
        failures++;
        $display("FAIL syndrome %0d", i);
      end
      if (first < 0 && readback[i] != pass_code) first = i;
    end
    checks++;
    if (fail_found !== (first >= 0) || (first >= 0 && fail_set != 4'(first))) begin
      failures++;
      $display("FAIL localize: found %0b set %0d, expected first %0d", fail_found, fail_set, first);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // example of the method, phase A
    phase = PHASE_A;
    for (int i = 0; i < N; i++) readback[i] = (i < 4) ? 2'b10 : 2'b11;
    #1;
    check_all();
    checks++;
    if (!(fail_found && fail_set == 4 && syndrome[4] == 2'b01 && syndrome[3] == 2'b00)) begin
      failures++; $display("FAIL example");
    end
    // all pass in both phases
    for (int p = 0; p < 2; p++) begin
      phase = test_phase_e'(p);
      for (int i = 0; i < N; i++) readback[i] = (p == 0) ? 2'b10 : 2'b01;
      #1;
      check_all();
      checks++;
      if (fail_found) begin failures++; $display("FAIL all-pass flagged"); end
    end
    // chain-shaped readbacks
    for (int p = 0; p < 2; p++) begin
      phase = test_phase_e'(p);
      for (int f = 0; f < N; f++) begin
        for (int i = 0; i < N; i++)
          readback[i] = (i < f) ? q_pst(phase) : ((f % 2) ? q_fst(phase) : q_before_test(phase));
        #1;
        check_all();
      end
    end
    // random
    for (int n = 0; n < 300; n++) begin
      phase = test_phase_e'($urandom_range(1));
      for (int i = 0; i < N; i++)
        readback[i] = ($urandom_range(3) == 0) ? 2'($urandom) : q_pst(phase);
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
