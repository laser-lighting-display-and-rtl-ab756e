// tb_laser_scan_system_full: the system with every parameter at its
// default (27 MHz clock assumed: 1350-clock command period, 21600-clock
// trace step, 128-entry trace memory, 720 x 501 camera window).
// One complete trace operation: reset and memory clear, three points
// recorded with the mouse (lit, blanked, lit), then several full replay
// loops checked word by word on the DAC bus. Then a sweep is started and
// followed to its first stop: Y must flip between 0x2000 and 0xE000 every
// 16 command periods and X must ramp to 2047 and halt there (the scanner
// is off, so no advance arrives). The sweep is then carried to its end:
// each brief turn-on of the scanner switch makes the scanner sequencer
// send one advance pulse over the link, and the sweep must move on to the
// next stop {n, 11 ones}, until after 31 advances it reaches 65534, pulses
// scan_complete once and returns to the centre with the laser off. The
// camera pipeline itself is not run at this size: a full-size
// noise-reduction pass lasts millions of video frames.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_laser_scan_system_full;
  import laser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, mode = 0, arm = 1, start = 0, rdy = 0;
  logic [8:0] dx = 0, dy = 0; logic [2:0] btn = 0;
  logic sclk, rst_n, cs_n, xs, ys, las;
  logic [7:0] disp;
  logic zwe; logic [18:0] zaddr; point3d_t zdata;
  logic ce, scanning, halted, done, adv, step, stored, clearing, c15, ld, pv;
  logic [15:0] xcode, ycode;
  int xl, yl, xbad, ybad, cyc = 0, last_ce = -1, n_adv = 0, n_done = 0;
  logic scan_on = 0;

  laser_scan_system dut (
    .clk(clk), .rst(rst), .mode_scan(mode), .laser_arm(arm), .scan_start(start),
    .mouse_dx(dx), .mouse_dy(dy), .mouse_ready(rdy), .mouse_btn(btn),
    .dac_sclk(sclk), .dac_rst_n(rst_n), .dac_cs_n(cs_n), .dac_x_sdi(xs), .dac_y_sdi(ys), .laser(las),
    .scan_on(scan_on), .threshold_sw(4'h8), .hcount(11'd0), .vcount(10'd0), .vid_pixel(8'd0), .disp_pixel(disp),
    .zbt_we(zwe), .zbt_addr(zaddr), .zbt_data(zdata),
    .command_enable(ce), .scanning(scanning), .sweep_halted(halted), .scan_complete(done),
    .advance_en(adv), .trace_step(step), .point_stored(stored), .trace_clearing(clearing),
    .comp15_active(c15), .ld_active(ld), .line_pt_valid(pv));
  dac8871_model dac_x (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(xs), .code(xcode), .loads(xl), .bad_frames(xbad));
  dac8871_model dac_y (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(ys), .code(ycode), .loads(yl), .bad_frames(ybad));
  always #18.5 clk = ~clk;   // 27 MHz

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (adv) n_adv++;
    if (done && !rst) n_done++;
    if (ce && !rst) begin
      if (last_ce >= 0) `CHECK(cyc - last_ce == 1350, $sformatf("command period %0d", cyc - last_ce))
      last_ce <= cyc;
    end
  end

  typedef struct { logic [15:0] x, y; logic l; } pt_t;
  pt_t seen[$];
  always @(posedge cs_n) if (rst_n) seen.push_back('{xcode, ycode, las});

  task automatic move(int mdx, int mdy);
    dx <= 9'(mdx); dy <= 9'(mdy); rdy <= 1; @(posedge clk); rdy <= 0;
  endtask
  task automatic click(int b);
    btn[b] <= 1; repeat (500) @(posedge clk); btn[b] <= 0;
    while (!stored) @(posedge clk);
  endtask

  initial begin
    pt_t pat[4];
    int s;
    repeat (3) @(posedge clk); rst <= 0;
    @(posedge clk); #1;
    `CHECK(clearing, "memory clear after reset")
    repeat (130) @(posedge clk); #1;
    `CHECK(!clearing, "memory clear takes 128 clocks")
    // record: A (lit) at 2047+200, 2047-100; B (dark) at 2047, 2047; C (lit) at 2047-255, 2047+255
    move(-200, 100); click(2);
    move(200, -100); click(0);
    move(255, -255); click(2);
    move(-10, -10);                         // cursor 1802, 2312
    pat[0] = '{{12'd2247, 4'h0}, {12'd1947, 4'h0}, 1'b1};
    pat[1] = '{{12'd2047, 4'h0}, {12'd2047, 4'h0}, 1'b0};
    pat[2] = '{{12'd1792, 4'h0}, {12'd2302, 4'h0}, 1'b1};
    pat[3] = '{{12'd1802, 4'h0}, {12'd2312, 4'h0}, 1'b1};
    repeat (21600 * 2) @(posedge clk);
    seen.delete();
    repeat (21600 * 4 * 3) @(posedge clk);
    // each trace step lasts 16 command periods; collapse repeats
    begin
      pt_t steps[$];
      foreach (seen[i]) if (steps.size() == 0 || seen[i] != steps[steps.size() - 1]) steps.push_back(seen[i]);
      s = -1;
      for (int i = 0; i < 4 && s < 0; i++) if (steps[i] == pat[0]) s = i;
      `CHECK(s >= 0, "first recorded point never shown")
      if (s >= 0) for (int i = s; i < steps.size(); i++)
        `CHECK(steps[i] == pat[(i - s) % 4], $sformatf("replay step %0d: %h,%h,%0d", i, steps[i].x, steps[i].y, steps[i].l))
      `CHECK(steps.size() >= 11, $sformatf("only %0d replay steps", steps.size()))
      `CHECK(seen.size() >= 16 * 11, "DAC frames per trace step")
    end
    // sweep to the first stop
    mode <= 1; start <= 1; @(posedge clk); start <= 0;
    seen.delete();
    while (!halted && cyc < 4000000) @(posedge clk);
    repeat (1350 * 40) @(posedge clk);
    begin
      int flips = 0, last_flip = -1, bad = 0;
      for (int i = 3; i < seen.size(); i++) begin
        if (seen[i].y != 16'h2000 && seen[i].y != 16'hE000) bad++;
        if (seen[i].y != seen[i - 1].y && i > 3) begin
          if (last_flip >= 0) `CHECK(i - last_flip == 16, $sformatf("Y flip after %0d commands", i - last_flip))
          last_flip = i; flips++;
        end
        `CHECK(seen[i].l, "laser off during sweep")
      end
      `CHECK(bad == 0, "Y words not at the two sweep levels")
      `CHECK(flips > 100, "Y flips")
      `CHECK(seen[seen.size() - 1].x == 16'd2047, $sformatf("sweep stopped at %0d", seen[seen.size() - 1].x))
    end
    `CHECK(halted && scanning && !done, "sweep halted at the first stop")
    // carry the sweep through every remaining stop
    for (int k = 1; k <= 31; k++) begin
      scan_on <= 1; repeat (4) @(posedge clk); scan_on <= 0;
      while (halted) @(posedge clk);
      seen.delete();
      while (!halted && !done) @(posedge clk);
      repeat (1350 * 3) @(posedge clk);
      `CHECK(n_adv == k, $sformatf("advance pulses %0d after %0d switch turns", n_adv, k))
      if (k < 31) begin
        `CHECK(halted && scanning, $sformatf("no halt at stop %0d", k))
        `CHECK(seen[seen.size() - 1].x == 16'((k << 11) | 11'h7FF),
               $sformatf("stop %0d at X=%0d", k, seen[seen.size() - 1].x))
        `CHECK(seen.size() > 2040 && seen.size() < 2060, $sformatf("stop %0d after %0d commands", k, seen.size()))
      end else begin
        `CHECK(!scanning, "sweep must end after the last advance")
        `CHECK(seen.size() > 1 && seen[seen.size() - 1].x == 16'h8000 && seen[seen.size() - 1].y == 16'h8000
               && !seen[seen.size() - 1].l, "idle centre with laser off after the sweep")
        begin
          int top = 0;
          foreach (seen[i]) if (seen[i].x > top) top = seen[i].x;
          `CHECK(top == 65534, $sformatf("highest X %0d", top))
        end
      end
    end
    `CHECK(n_done == 1, $sformatf("scan_complete pulses %0d", n_done))
    `CHECK(xbad == 0 && ybad == 0 && xl == yl, "DAC frames")
    $display("INFO DAC loads %0d, clocks %0d", xl, cyc);
    `TB_FINISH
  end
  initial begin
    repeat (100000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
