// tb_projector_main: random inputs; in trace mode the output must be the
// 12-bit coordinate followed by four zeros and the laser gated by the arm
// switch, in scan mode the 16-bit sweep command; one clock of latency.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_projector_main;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, mode = 0, arm = 0, tl = 0, sl = 0, las;
  logic [11:0] tx = 0, ty = 0;
  logic [15:0] sx = 0, sy = 0, xo, yo;
  int nm = 0, ns = 0;

  projector_main dut (.clk(clk), .rst(rst), .mode_scan(mode), .laser_arm(arm),
    .trace_x(tx), .trace_y(ty), .trace_laser(tl), .scan_x(sx), .scan_y(sy),
    .scan_laser(sl), .x_cmd(xo), .y_cmd(yo), .laser(las));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      logic m, a, t1, s1; logic [11:0] x1, y1; logic [15:0] x2, y2;
      m = 1'($urandom); a = 1'($urandom); t1 = 1'($urandom); s1 = 1'($urandom);
      x1 = 12'($urandom); y1 = 12'($urandom); x2 = 16'($urandom); y2 = 16'($urandom);
      mode <= m; arm <= a; tl <= t1; sl <= s1; tx <= x1; ty <= y1; sx <= x2; sy <= y2;
      @(posedge clk); #1;
      if (m) begin
        ns++;
        `CHECK(xo == x2 && yo == y2 && las == s1, "scan mode routing")
      end else begin
        nm++;
        `CHECK(xo == {x1, 4'h0} && yo == {y1, 4'h0} && las == (t1 & a), "trace mode routing")
      end
    end
    `CHECK(nm > 0 && ns > 0, "both modes exercised")
    `TB_FINISH
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
