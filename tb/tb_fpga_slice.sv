`timescale 1ps/1ps
// tb_fpga_slice: self-checking test of the generic slice. Random LUT
// contents and inputs check both LUTs against a table lookup done here;
// the flip-flops are checked for init loading under gsr, capture on the
// rising clock edge with clk_inv=0, capture on the falling edge with
// clk_inv=1, and no capture on the opposite edge.
module tb_fpga_slice;
  import fdt_pkg::*;

  logic [3:0]  f_in, g_in;
  logic [15:0] f_init, g_init;
  logic clk_in, clk_inv, qx_init, qy_init, gsr;
  logic f_out, g_out, qx, qy;
  int checks = 0, failures = 0;

  fpga_slice dut (.*);

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk_in = 0; clk_inv = 0; gsr = 0; qx_init = 0; qy_init = 1;
    #5 gsr = 1;
    f_in = 0; g_in = 0; f_init = 0; g_init = 0;
    #10;
    check(qx, 1'b0, "init qx");
    check(qy, 1'b1, "init qy");
    gsr = 0; #5; qx_init = 1; qy_init = 0; #5; gsr = 1; #10;
    check(qx, 1'b1, "init qx swapped");
    check(qy, 1'b0, "init qy swapped");

    // LUT contents
    for (int n = 0; n < 200; n++) begin
      f_init = 16'($urandom); g_init = 16'($urandom);
      f_in = 4'($urandom); g_in = 4'($urandom);
      #5;
      check(f_out, (f_init >> f_in) & 1'b1, "lut f");
      check(g_out, (g_init >> g_in) & 1'b1, "lut g");
    end

    // capture, both polarities
    gsr = 0; #10;
    for (int n = 0; n < 100; n++) begin
      logic ex, ey, px, py;
      clk_inv = n[0];
      #5;
      f_init = 16'($urandom); g_init = 16'($urandom);
      f_in = 4'($urandom); g_in = 4'($urandom);
      #5;
      ex = f_init[f_in]; ey = g_init[g_in];
      px = qx; py = qy;
      // edge of the wrong polarity first: nothing changes
      clk_in = clk_inv; #5;
      if (clk_inv) begin clk_in = 1; #5; end
      check(qx, px, "no capture on wrong edge x");
      check(qy, py, "no capture on wrong edge y");
      // active edge
      clk_in = ~clk_in; #5;
      check(qx, ex, "capture x");
      check(qy, ey, "capture y");
      clk_in = 0; clk_inv = 0; #5;
      // return to low may be an active edge for clk_inv=1; resync the reference
      gsr = 1; #5; gsr = 0; #5;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
