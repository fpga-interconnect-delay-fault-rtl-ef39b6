`timescale 1ps/1ps
// fpga_slice: simplified FPGA slice (logic cell pair) as used by the test
// method: two 4-input LUTs, a clock input with a configurable inverter, and
// two flip-flops that capture the LUT outputs.
//
// LUT F feeds flip-flop X and LUT G feeds flip-flop Y. Both flip-flops share
// one clock; `clk_inv` selects whether they capture on the rising or the
// falling edge of `clk_in`. The configuration values (LUT contents, clock
// polarity, flip-flop init values) are inputs so that a partial
// reconfiguration is just a change of these signals.
//
// `gsr` is the global set/reset the FPGA applies at the end of
// configuration: its rising edge loads the init values asynchronously, and
// while it is high the flip-flops ignore the clock. Set the init values
// before raising gsr. The LUT outputs are also brought
// out, because the test configuration routes LUT F (First_i) back into the
// slice clock through a feedback delay.
//
// The structure (2 LUTs, a true/inverted clock select, 2 flip-flops) follows
// the simplified slice of the method; flip-flops rather than latches and an
// asynchronous gsr are choices of this model.
module fpga_slice
  import fdt_pkg::*;
#(
  parameter int unsigned K = LUT_INPUTS
) (
  input  logic [K-1:0]      f_in,
  input  logic [K-1:0]      g_in,
  input  logic [(1<<K)-1:0] f_init,
  input  logic [(1<<K)-1:0] g_init,
  input  logic              clk_in,
  input  logic              clk_inv,
  input  logic              qx_init,
  input  logic              qy_init,
  input  logic              gsr,
  output logic              f_out,
  output logic              g_out,
  output logic              qx,
  output logic              qy
);
  logic clk_eff;

  lut4 #(.K(K)) u_lut_f (.init(f_init), .in(f_in), .out(f_out));
  lut4 #(.K(K)) u_lut_g (.init(g_init), .in(g_in), .out(g_out));

  // Clock polarity select: the true or the inverted clock.
  assign clk_eff = clk_inv ? ~clk_in : clk_in;

  always_ff @(posedge clk_eff or posedge gsr) begin
    if (gsr) begin
      qx <= qx_init;
      qy <= qy_init;
    end else begin
      qx <= f_out;
      qy <= g_out;
    end
  end
endmodule
