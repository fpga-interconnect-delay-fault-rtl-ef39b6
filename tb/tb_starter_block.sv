`timescale 1ps/1ps
// tb_starter_block: self-checking test of slice 0. For each phase it
// configures the block, applies the one tester transition, checks First_0
// and Last_0 right after it, closes the clock loop by hand 300 ps later and
// checks that X_1 and Y_1 switch to opposite values (10 in phase A, 01 in
// phase B); it also checks that the wrong-direction input edge captures
// nothing.
module tb_starter_block;
  import fdt_pkg::*;

  test_phase_e phase;
  logic gsr, test_in, clock_in, first_out, last_out, qx, qy;
  int checks = 0, failures = 0;

  starter_block dut (.*);

  task automatic check2(input logic [1:0] got, input logic [1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
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
    phase = PHASE_A; gsr = 0; test_in = 0; clock_in = 0;
    for (int p = 0; p < 2; p++) begin
      logic start;
      start = (p == 0) ? 1'b0 : 1'b1;
      gsr = 0; #5;
      phase = test_phase_e'(p);
      test_in = start; clock_in = start;
      #5 gsr = 1; #10 gsr = 0; #10;
      check2({qx, qy}, (p == 0) ? 2'b01 : 2'b10, "init code");
      check2({first_out, last_out}, {start, ~start}, "first/last before");
      test_in = ~start; #10;
      check2({first_out, last_out}, {~start, start}, "first/last after");
      check2({qx, qy}, (p == 0) ? 2'b01 : 2'b10, "held before clock");
      #290 clock_in = first_out; #10;
      check2({qx, qy}, (p == 0) ? 2'b10 : 2'b01, "X and Y launched");

      // wrong direction input edge: no capture
      gsr = 0; #5;
      test_in = ~start; clock_in = ~start;
      #5 gsr = 1; #10 gsr = 0; #10;
      test_in = start; #100 clock_in = first_out; #10;
      check2({qx, qy}, (p == 0) ? 2'b01 : 2'b10, "wrong edge ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
