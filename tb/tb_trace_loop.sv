// tb_trace_loop: records a pattern with the mouse and checks the replay.
// LOOP_COUNT is cut to 40 clocks. After reset the memory must be all
// zero. Three points are recorded (left, right, left click); the replay
// must then cycle through them in order with their laser bits, followed
// by the live cursor with the laser on, one entry per loop step, each
// shown two clocks after the step and held until the next one. A second
// reset must clear the pattern. Finally all 128 entries are filled and
// replayed, and the cursor slot must stay on the last entry.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_trace_loop;
  import laser_pkg::*;
  localparam int LC = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  coord_t mx = 0, my = 0, xo, yo;
  logic [2:0] btn = 0;
  logic las, step, clearing, stored;
  logic [6:0] la, ca;
  logic s1 = 0, s2 = 0;
  int steps = 0, last_step = -1, cyc = 0;
  trace_entry_t seen[$];

  trace_loop #(.LOOP_COUNT(LC)) dut (.clk(clk), .rst(rst), .mx(mx), .my(my), .btn_click(btn),
    .x_out(xo), .y_out(yo), .laser(las), .loop_enable(step), .clearing(clearing),
    .loop_addr(la), .current_addr(ca), .point_stored(stored));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    s1 <= step; s2 <= s1;
    if (rst || clearing) last_step <= -1;
    else if (step) begin
      if (last_step >= 0) `CHECK(cyc - last_step == LC, $sformatf("loop step period %0d", cyc - last_step))
      last_step <= cyc; steps++;
    end
  end
  always @(negedge clk) if (s2) seen.push_back('{x: xo, y: yo, laser: las});

  task automatic click(int b, coord_t x, coord_t y);
    mx <= x; my <= y;
    btn[b] <= 1; repeat (7) @(posedge clk); btn[b] <= 0;
    while (!stored) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic check_replay(trace_entry_t pat[$], string what);
    int n = pat.size();
    seen.delete();
    repeat (3 * n * LC + 4) @(posedge clk);
    // find where entry 0 shows up, then compare with the cyclic pattern
    begin
      int s = -1;
      for (int i = 0; i < n && s < 0; i++) if (seen[i] == pat[0]) s = i;
      `CHECK(s >= 0, {what, ": first entry never shown"})
      if (s >= 0)
        for (int i = s; i < seen.size(); i++)
          `CHECK(seen[i] == pat[(i - s) % n],
                 $sformatf("%s: step %0d shows %h expected %h", what, i, seen[i], pat[(i - s) % n]))
    end
  endtask

  initial begin
    trace_entry_t pat[$];
    repeat (2) @(posedge clk); rst <= 0;
    @(posedge clk); #1;
    `CHECK(clearing, "clearing after reset")
    repeat (130) @(posedge clk); #1;
    `CHECK(!clearing, "clearing lasts 128 clocks")
    for (int a = 0; a < 128; a++) `CHECK(dut.u_mem.mem[a] == '0, "memory not cleared")
    // only the cursor
    mx <= 12'd100; my <= 12'd200;
    pat = '{'{x: 12'd100, y: 12'd200, laser: 1'b1}};
    check_replay(pat, "cursor only");
    click(2, 12'd1000, 12'd1100);     // left: laser on
    click(0, 12'd3000, 12'd50);       // right: laser off
    click(2, 12'd4095, 12'd4095);     // left: laser on
    mx <= 12'd7; my <= 12'd9;
    `CHECK(ca == 3, $sformatf("current address %0d", ca))
    pat = '{'{x: 12'd1000, y: 12'd1100, laser: 1'b1}, '{x: 12'd3000, y: 12'd50, laser: 1'b0},
            '{x: 12'd4095, y: 12'd4095, laser: 1'b1}, '{x: 12'd7, y: 12'd9, laser: 1'b1}};
    check_replay(pat, "pattern");
    // reset clears everything
    rst <= 1; repeat (2) @(posedge clk); rst <= 0;
    repeat (140) @(posedge clk);
    `CHECK(ca == 0, "current address after reset")
    pat = '{'{x: 12'd7, y: 12'd9, laser: 1'b1}};
    check_replay(pat, "after reset");
    // fill the whole memory: 127 recorded points plus the cursor slot
    pat.delete();
    for (int i = 0; i < 127; i++) begin
      coord_t px, py;
      logic lit;
      px = coord_t'(i * 31 + 5); py = coord_t'(4000 - i * 29);
      lit = (i % 3) != 1;
      click(lit ? 2 : 0, px, py);
      pat.push_back('{x: px, y: py, laser: lit});
    end
    mx <= 12'd2222; my <= 12'd1111;
    `CHECK(ca == 127, $sformatf("current address %0d when full", ca))
    pat.push_back('{x: 12'd2222, y: 12'd1111, laser: 1'b1});
    check_replay(pat, "full memory");
    // one more click: the address stays on the last slot
    btn[2] <= 1; repeat (7) @(posedge clk); btn[2] <= 0;
    repeat (2 * 128 * LC) @(posedge clk);
    `CHECK(ca == 127, "current address must saturate")
    `CHECK(steps > 20, "loop steps")
    `TB_FINISH
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
