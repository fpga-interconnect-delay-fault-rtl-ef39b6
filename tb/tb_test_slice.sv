`timescale 1ps/1ps
// tb_test_slice: self-checking test of a test-chain slice in both phases.
// The testbench plays the incoming set of paths and the feedback loop: it
// drives X1, X2, Y1, Y2 and Clock_i directly. It checks First_i and Last_i
// for all 16 input combinations against the phase A / phase B functions
// written out here, the init codes after gsr, the PST when every line has
// switched before the clock edge, the FST when one line is late, and that an
// incoming FST is passed on as an FST.
module tb_test_slice;
  import fdt_pkg::*;

  test_phase_e phase;
  logic gsr, clock_in, first_out, last_out, qx, qy;
  logic [1:0] x_in, y_in;
  int checks = 0, failures = 0;

  test_slice dut (.*);

  task automatic check2(input logic [1:0] got, input logic [1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // Configure: set phase and the pre-test line values, pulse gsr.
  task automatic configure(input test_phase_e ph);
    gsr = 0; #5;
    phase = ph;
    x_in = (ph == PHASE_A) ? 2'b00 : 2'b11;
    y_in = (ph == PHASE_A) ? 2'b11 : 2'b00;
    clock_in = (ph == PHASE_A) ? 1'b0 : 1'b1;
    #5 gsr = 1; #10 gsr = 0; #10;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = PHASE_A; gsr = 0; x_in = 0; y_in = 0; clock_in = 0;
    // LUT functions, both phases
    for (int p = 0; p < 2; p++) begin
      configure(test_phase_e'(p));
      for (int a = 0; a < 16; a++) begin
        logic x1, x2, y1, y2, ef, el;
        {y2, y1, x2, x1} = 4'(a);
        x_in = {x2, x1}; y_in = {y2, y1};
        #5;
        ef = (p == 0) ? (x1 || x2 || !y1 || !y2) : (x1 && x2 && !y1 && !y2);
        el = (p == 0) ? (!x1 || !x2 || y1 || y2) : (!x1 && !x2 && y1 && y2);
        check2({first_out, last_out}, {ef, el}, $sformatf("luts phase %0d in %0h", p, a));
      end
    end

    for (int p = 0; p < 2; p++) begin
      test_phase_e ph;
      logic clk_active;
      ph = test_phase_e'(p);
      clk_active = (ph == PHASE_A) ? 1'b1 : 1'b0;

      // pass: all four lines switch, then the clock edge
      configure(ph);
      check2({qx, qy}, (p == 0) ? 2'b01 : 2'b10, "init code");
      x_in = ~x_in; #100; y_in = ~y_in; #100;
      clock_in = clk_active; #20;
      check2({qx, qy}, (p == 0) ? 2'b10 : 2'b01, "PST");

      // fail: Y2 late, arrives after the clock edge
      for (int late = 0; late < 4; late++) begin
        configure(ph);
        x_in = ~x_in;
        y_in = ~y_in;
        case (late)
          0: x_in[0] = ~x_in[0];
          1: x_in[1] = ~x_in[1];
          2: y_in[0] = ~y_in[0];
          default: y_in[1] = ~y_in[1];
        endcase
        #100;
        clock_in = clk_active; #20;
        check2({qx, qy}, (p == 0) ? 2'b11 : 2'b00, $sformatf("FST late line %0d", late));
        // the late line arrives after the clock: result stays
        x_in = (ph == PHASE_A) ? 2'b11 : 2'b00;
        y_in = (ph == PHASE_A) ? 2'b00 : 2'b11;
        #20;
        check2({qx, qy}, (p == 0) ? 2'b11 : 2'b00, "FST held");
      end

      // incoming FST (X switched, Y did not) is propagated as FST
      configure(ph);
      x_in = ~x_in; #100;
      clock_in = clk_active; #20;
      check2({qx, qy}, (p == 0) ? 2'b11 : 2'b00, "FST propagated");
      // no transition at all: nothing captured
      configure(ph);
      #100;
      check2({qx, qy}, (p == 0) ? 2'b01 : 2'b10, "no input, init kept");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
