`timescale 1ps/1ps
// tb_feedback_delay: checks that the loop model delays both edges of
// First_i by exactly DELAY_PS, for the default (1020 ps) and for a second
// value, by timing each output edge against its input edge.
module tb_feedback_delay;
  logic d0, q0, d1, q1;
  int checks = 0, failures = 0;

  feedback_delay         dut0 (.d(d0), .q(q0));
  feedback_delay #(.DELAY_PS(360)) dut1 (.d(d1), .q(q1));

  task automatic measure(input int idx, input logic val, input int exp_ps);
    time t0;
    t0 = $time;
    if (idx == 0) begin d0 = val; wait (q0 == val); end
    else          begin d1 = val; wait (q1 == val); end
    checks++;
    if ($time - t0 != exp_ps) begin
      failures++;
      $display("FAIL delay %0d: %0t ps, expected %0d", idx, $time - t0, exp_ps);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d0 = 0; d1 = 0;
    #5000;
    checks++;
    if (q0 !== 1'b0 || q1 !== 1'b0) begin failures++; $display("FAIL settle"); end
    for (int n = 0; n < 4; n++) begin
      measure(0, ~d0, 1020);
      #3000;
      measure(1, ~d1, 360);
      #3000;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
