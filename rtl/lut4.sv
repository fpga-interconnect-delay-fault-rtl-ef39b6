`timescale 1ps/1ps
// lut4: a K-input look-up table, the logic element of an FPGA slice.
// The output is the bit of the configuration word `init` addressed by the
// inputs, so any function of K inputs can be loaded. Purely combinational.
module lut4 #(
  parameter int unsigned K = 4
) (
  input  logic [(1<<K)-1:0] init,   // configuration contents
  input  logic [K-1:0]      in,     // LUT address
  output logic              out
);
  assign out = init[in];
endmodule
