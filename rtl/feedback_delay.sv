`timescale 1ps/1ps
// feedback_delay: behavioural model, not synthesizable logic. It stands for
// the routing loop that carries First_i from a slice's LUT back to the same
// slice's clock pin as Clock_i.
//
// The loop delay t_feedback sets the sensitivity of the test: a set of
// paths passes when its latest line arrives less than t_feedback after its
// earliest one. In an FPGA the loop is made of wire segments and switch
// points, and a longer loop makes the test less sensitive. Here it is a
// plain delay of DELAY_PS picoseconds. The default, 1020 ps, is the average
// minimum feedback delay listed for a fast Virtex device; other device
// values are set through the parameter.
//
// The assignment delay is inertial: a pulse shorter than DELAY_PS does not
// appear at the output. First_i makes one transition per test, so this does
// not matter in use.
module feedback_delay #(
  parameter int unsigned DELAY_PS = 1020
) (
  input  logic d,   // First_i
  output logic q    // Clock_i
);
  assign #(DELAY_PS) q = d;
endmodule
