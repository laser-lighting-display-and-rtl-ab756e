// tb_mouse_xy: random mouse packets against an integer reference model.
// The model moves the position opposite to the signed motion on both axes
// and clamps to 0..4095; big motions push it into both limits.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_mouse_xy;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, rdy = 0;
  logic [8:0] dx = 0, dy = 0;
  logic [11:0] mx, my;
  int ex, ey, sat_lo = 0, sat_hi = 0;

  mouse_xy dut (.clk(clk), .rst(rst), .dx(dx), .dy(dy), .data_ready(rdy), .mx(mx), .my(my));
  always #5 clk = ~clk;

  function automatic int model(int pos, int d);
    int n = pos - d;            // inverted axis
    if (n < 0) n = 0;
    if (n > 4095) n = 4095;
    return n;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    `CHECK(mx == 2047 && my == 2047, "reset position not centre")
    ex = 2047; ey = 2047;
    for (int i = 0; i < 2000; i++) begin
      int sdx, sdy;
      sdx = $signed(9'($urandom_range(0, 511)));
      sdy = $signed(9'($urandom_range(0, 511)));
      if (i >= 200 && i < 260) sdx = 255;     // drive X down into 0
      if (i >= 260 && i < 320) sdx = -256;    // drive X up into 4095
      dx <= 9'(sdx); dy <= 9'(sdy); rdy <= 1;
      @(posedge clk); rdy <= 0; #1;
      ex = model(ex, sdx); ey = model(ey, sdy);
      if (ex == 0) sat_lo++;
      if (ex == 4095) sat_hi++;
      `CHECK(mx == 12'(ex) && my == 12'(ey), $sformatf("pos %0d,%0d expected %0d,%0d", mx, my, ex, ey))
      @(posedge clk); #1;
      `CHECK(mx == 12'(ex), "position moved without data_ready")
    end
    `CHECK(sat_lo > 0 && sat_hi > 0, "saturation not exercised")
    `TB_FINISH
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
