`timescale 1ps/1ps
// tb_path_set: self-checking test of the interconnect model. It checks the
// fan-out of Q_X and Q_Y onto the X1, Y1, X2, Y2 lines, the fault-free
// delay, the extra delay of a resistive open on each line (sampled 1 ps
// before and after the expected arrival), defects that slow only rising or
// only falling edges, stuck-at-0/1, stuck-open (the
// line keeps its value from configuration) and wired-AND / wired-OR bridges
// between neighbouring lines.
module tb_path_set;
  import fdt_pkg::*;
  localparam int D = 500;

  logic cfg, qx, qy;
  line_defect_t defect [PATHS_PER_SET];
  logic [1:0] x_out, y_out;
  logic [3:0] bus;   // X1, Y1, X2, Y2 at the far end, bus order
  int checks = 0, failures = 0;

  path_set dut (.*);

  assign bus = {y_out[1], x_out[1], y_out[0], x_out[0]};

  task automatic check4(input logic [3:0] got, input logic [3:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic configure(input logic x0, input logic y0);
    cfg = 1; qx = x0; qy = y0; #10 cfg = 0; #10;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) defect[k] = LINE_GOOD;
    cfg = 1; qx = 0; qy = 1;
    #10;
    check4(bus, 4'b1010, "settled during cfg");
    cfg = 0; #10;

    // fault-free delay, both edge directions
    for (int n = 0; n < 2; n++) begin
      qx = ~qx; qy = ~qy;
      #(D - 1) check4(bus, {qy, qx, qy, qx} ^ 4'b1111, "before path delay");
      #2       check4(bus, {qy, qx, qy, qx}, "after path delay");
      #100;
    end

    // resistive open on each line in turn
    for (int k = 0; k < 4; k++) begin
      int extra;
      extra = 200 + 150 * k;
      for (int j = 0; j < 4; j++) defect[j] = LINE_GOOD;
      defect[k].defect_ps = 16'(extra);
      configure(0, 1);
      qx = 1; qy = 0;
      #(D + 1) check4(bus, 4'b0101 ^ (4'b1 << k), $sformatf("line %0d still late", k));
      #(extra - 2) check4(bus, 4'b0101 ^ (4'b1 << k), $sformatf("line %0d just before", k));
      #2 check4(bus, 4'b0101, $sformatf("line %0d arrived", k));
    end

    // slow-to-rise / slow-to-fall on line 0 (X1): only that edge is late
    for (int e = 1; e < 3; e++) begin
      for (int j = 0; j < 4; j++) defect[j] = LINE_GOOD;
      defect[0].defect_ps   = 16'd300;
      defect[0].defect_edge = defect_edge_e'(e);
      configure(0, 1);
      qx = 1; qy = 0;   // X1 rises
      #(D + 10) check4(4'(bus[0]), (e == 1) ? 4'd0 : 4'd1, "X1 rise with edge-selective defect");
      #300;
      check4(4'(bus[0]), 4'd1, "X1 risen");
      qx = 0; qy = 1;   // X1 falls
      #(D + 10) check4(4'(bus[0]), (e == 2) ? 4'd1 : 4'd0, "X1 fall with edge-selective defect");
      #300;
      check4(4'(bus[0]), 4'd0, "X1 fallen");
    end

    // stuck-at and stuck-open on line 2 (X2)
    for (int f = 1; f < 4; f++) begin
      for (int j = 0; j < 4; j++) defect[j] = LINE_GOOD;
      defect[2].fault = line_fault_e'(f);
      configure(0, 1);
      qx = 1; qy = 0;
      #(D + 10);
      check4(4'(bus[2]), (f == 2) ? 4'd1 : 4'd0, $sformatf("fault %0d on X2", f));
      check4(4'(bus[0]), 4'd1, "X1 unaffected");
    end

    // bridges between X1 and Y1
    for (int b = 1; b < 3; b++) begin
      for (int j = 0; j < 4; j++) defect[j] = LINE_GOOD;
      defect[0].bridge_up = bridge_e'(b);
      configure(0, 1);
      check4(4'(bus[1:0]), (b == 1) ? 4'b0000 : 4'b0011, "bridge before test");
      qx = 1; qy = 0;
      #(D + 10);
      check4(4'(bus[1:0]), (b == 1) ? 4'b0000 : 4'b0011, "bridge after test");
      check4(4'(bus[3:2]), 4'b0001, "X2/Y2 unaffected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
