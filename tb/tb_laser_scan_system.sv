// tb_laser_scan_system: the whole system end to end at reduced sizes:
// command period 10 clocks, trace loop 160, four sweep stops
// (ADV_BITS = 2, STOP_LSBS = 14), a 16 x 8 camera window in a 20 x 10
// raster. The camera sees the laser line at a column that follows the X
// galvanometer word decoded from the DAC bus, so the scanner's results
// depend on what the projector actually sent.
// Phase 1 (trace mode): clear after reset, record two points, replay.
// Phase 2 (scan mode): the sweep and the scanner run together; every stop
// must produce one 3D point per row, the sweep must halt and be released
// by advance_en, and scan_complete must end both.
// Each mechanism is counted and one that never happened is a failure.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_laser_scan_system;
  import laser_pkg::*;
  localparam int CC = 10, H = 16, V = 8, HT = 20, VT = 10, XS = 1, XE = 14, YS = 1, YE = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, mode = 0, arm = 1, start = 0, rdy = 0, scan_on = 0;
  logic [8:0] dx = 0, dy = 0; logic [2:0] btn = 0;
  logic sclk, rst_n, cs_n, xs, ys, las;
  logic [10:0] hc = 0; logic [9:0] vc = 0; logic [7:0] pix, disp;
  logic zwe; logic [18:0] zaddr; point3d_t zdata;
  logic ce, scanning, halted, done, adv, step, stored, clearing, c15, ld, pv;
  logic [15:0] xcode, ycode;
  int xl, yl, xbad, ybad, frame = 0;
  // mechanism counters
  int n_clear = 0, n_step = 0, n_stored = 0, n_dark = 0, n_halt = 0, n_adv = 0, n_done = 0;
  int n_c15 = 0, n_ld = 0, n_pts = 0, n_flip = 0, n_mode = 0;
  logic q_clear = 0, q_halt = 0, q_c15 = 0, q_ld = 0, q_we = 0, q_mode = 0;
  logic [15:0] q_y = 0;

  laser_scan_system #(.CMD_COUNT(CC), .LOOP_COUNT(16 * CC), .ADV_BITS(2), .STOP_LSBS(14),
    .H_SIZE(H), .V_SIZE(V), .X_START(XS), .X_STOP(XE), .Y_START(YS), .Y_STOP(YE)) dut (
    .clk(clk), .rst(rst), .mode_scan(mode), .laser_arm(arm), .scan_start(start),
    .mouse_dx(dx), .mouse_dy(dy), .mouse_ready(rdy), .mouse_btn(btn),
    .dac_sclk(sclk), .dac_rst_n(rst_n), .dac_cs_n(cs_n), .dac_x_sdi(xs), .dac_y_sdi(ys), .laser(las),
    .scan_on(scan_on), .threshold_sw(4'h8), .hcount(hc), .vcount(vc), .vid_pixel(pix), .disp_pixel(disp),
    .zbt_we(zwe), .zbt_addr(zaddr), .zbt_data(zdata),
    .command_enable(ce), .scanning(scanning), .sweep_halted(halted), .scan_complete(done),
    .advance_en(adv), .trace_step(step), .point_stored(stored), .trace_clearing(clearing),
    .comp15_active(c15), .ld_active(ld), .line_pt_valid(pv));
  dac8871_model dac_x (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(xs), .code(xcode), .loads(xl), .bad_frames(xbad));
  dac8871_model dac_y (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(ys), .code(ycode), .loads(yl), .bad_frames(ybad));
  always #5 clk = ~clk;

  // camera: laser line 3 pixels wide where the X mirror points, lit only
  // while the laser is on and the sweep is running
  int col;
  always_comb begin
    int h, ph;
    h = int'(hc); ph = (7 * frame + 3 * h + int'(vc)) % 15;
    col = 1 + int'(xcode >> 13);
    if (mode && las && h >= col && h < col + 3 && ph < 13) pix = 8'd200;
    else pix = 8'd20;
  end
  always @(posedge clk) begin
    if (32'(hc) == HT - 1) begin
      hc <= 0;
      if (32'(vc) == VT - 1) begin vc <= 0; frame <= frame + 1; end
      else vc <= vc + 1;
    end else hc <= hc + 1;
  end

  always @(negedge clk) if (!rst) begin
    if (clearing && !q_clear) n_clear++;
    if (step) n_step++;
    if (stored) n_stored++;
    if (halted && !q_halt) n_halt++;
    if (adv) n_adv++;
    if (done) n_done++;
    if (c15 && !q_c15) n_c15++;
    if (ld && !q_ld) n_ld++;
    if (mode != q_mode) n_mode++;
    if (scanning && ycode != q_y && q_y != 0) n_flip++;
    if (zwe && !q_we) begin
      `CHECK(int'(zaddr) == n_pts, $sformatf("ZBT address %0d expected %0d", zaddr, n_pts))
      `CHECK(zdata.z == 12'd1 && int'(zdata.y) == YS + n_pts % (YE - YS + 1),
             $sformatf("point %0d row %0d z %0d", n_pts, zdata.y, zdata.z))
      `CHECK(int'(zdata.x) >= XS && int'(zdata.x) <= XE, $sformatf("point x %0d outside window", zdata.x))
      n_pts++;
    end
    q_clear = clearing; q_halt = halted; q_c15 = c15; q_ld = ld; q_we = zwe; q_mode = mode; q_y = ycode;
  end
  always @(posedge cs_n) if (rst_n && !las && !mode) n_dark++;

  task automatic move(int mdx, int mdy);
    dx <= 9'(mdx); dy <= 9'(mdy); rdy <= 1; @(posedge clk); rdy <= 0;
  endtask
  task automatic click(int b);
    btn[b] <= 1; repeat (5) @(posedge clk); btn[b] <= 0;
    while (!stored) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (200) @(posedge clk);
    // phase 1: trace
    move(-100, 0); click(2);
    move(200, 100); click(0);
    move(-50, -50);
    repeat (16 * CC * 10) @(posedge clk);
    `CHECK(xl > 100 && xl == yl, "DACs loading in trace mode")
    // phase 2: scan
    mode <= 1; start <= 1; @(posedge clk); start <= 0;
    scan_on <= 1;
    while (!done) @(posedge clk);
    repeat (50) @(posedge clk);
    scan_on <= 0; mode <= 0;
    repeat (16 * CC * 4) @(posedge clk); #1;
    `CHECK(!scanning && !c15 && !ld, "system idle after the scan")
    `CHECK(n_pts == n_ld * (YE - YS + 1), $sformatf("%0d points for %0d line detections", n_pts, n_ld))
    `CHECK(xbad == 0 && ybad == 0, "DAC frames of wrong length")
    $display("INFO clear %0d steps %0d stored %0d dark %0d halts %0d advances %0d complete %0d",
             n_clear, n_step, n_stored, n_dark, n_halt, n_adv, n_done);
    $display("INFO compare15 %0d line_det %0d points %0d yflips %0d mode switches %0d dac loads %0d",
             n_c15, n_ld, n_pts, n_flip, n_mode, xl);
    `CHECK(n_clear >= 1, "memory clear never happened")
    `CHECK(n_step > 0, "trace loop step never happened")
    `CHECK(n_stored == 2, "trace points not stored")
    `CHECK(n_dark > 0, "blanked trace point never shown")
    `CHECK(n_halt >= 1, "sweep halt never happened")
    `CHECK(n_adv >= 2, "advance never happened")
    `CHECK(n_done == 1, "scan_complete not exactly once")
    `CHECK(n_c15 >= 2, "compare15 pass never happened")
    `CHECK(n_ld >= 2, "line detection never happened")
    `CHECK(n_pts >= 2 * (YE - YS + 1), "3D points never stored")
    `CHECK(n_flip > 10, "Y flip never happened")
    `CHECK(n_mode >= 2, "mode switch never happened")
    `TB_FINISH
  end
  initial begin
    repeat (6000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
