// tb_scan_sweep: a whole sweep at the default sizes, with command_enable
// every 4 clocks to keep it short. An independent model follows the X
// ramp: X steps once per command_enable, halts at every stop point
// 2047, 4095, ... until an advance request, and the sweep ends with one
// scan_complete pulse at 65534. Y must flip between 0x2000 and 0xE000
// every 16 command enables; idle must hold the centre with the laser off.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_scan_sweep;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, ce = 0, adv = 0;
  logic [15:0] xc, yc;
  logic laser, done, scanning, halted;
  int cyc = 0, n_ce = 0, n_done = 0, n_halt = 0, n_flip = 0, last_flip_ce = -1;
  int halt_len = 0, sc_cyc = 0;
  logic [15:0] halt_x = 0;
  logic [15:0] prev_y = 16'h2000;
  logic prev_halted = 0;

  scan_sweep dut (.clk(clk), .rst(rst), .start(start), .command_enable(ce), .advance_in(adv),
    .x_cmd(xc), .y_cmd(yc), .laser(laser), .scan_complete(done), .scanning(scanning),
    .x_halted(halted));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    ce  <= (cyc % 4) == 0;
  end

  // Monitors (sampled away from the clock edge)
  always @(negedge clk) if (!rst) begin
    if (ce) n_ce++;
    if (done) n_done++;
    if (scanning) sc_cyc++; else sc_cyc = 0;
    if (scanning && sc_cyc > 2) begin
      `CHECK(yc == 16'h2000 || yc == 16'hE000, $sformatf("bad Y %h", yc))
      if (yc != prev_y && sc_cyc > 3) begin
        if (last_flip_ce >= 0) `CHECK(n_ce - last_flip_ce == 16, $sformatf("Y flip after %0d enables", n_ce - last_flip_ce))
        last_flip_ce = n_ce; n_flip++;
      end
      prev_y = yc;
      // stop points are {k, 11 ones}
      if (halted && !prev_halted) begin
        n_halt++;
        `CHECK(xc[10:0] == 11'h7FF || xc == 16'hFFFE, $sformatf("halted at X=%h", xc))
      end
      if (halted && !prev_halted) halt_x = xc;
      if (halted) `CHECK(xc == halt_x, $sformatf("X moved from %h to %h while halted", halt_x, xc))
      if (halted) halt_len++;
      // advance request some time after a halt
      adv <= (halted && halt_len == 30);
      if (!halted) halt_len = 0;
    end
    prev_halted = halted;
  end

  initial begin
    int x_prev;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (10) @(posedge clk); #1;
    `CHECK(!scanning && !laser && xc == 16'h8000 && yc == 16'h8000, "idle must hold centre, laser off")
    start <= 1; @(posedge clk); start <= 0;
    repeat (3) @(posedge clk); #1;
    `CHECK(scanning && laser, "scan state with laser on")
    // X must never decrease or jump by more than one during the sweep
    x_prev = 0;
    while (!done && cyc < 400000) begin
      @(negedge clk);
      if (scanning) begin
        `CHECK(int'(xc) == x_prev || int'(xc) == x_prev + 1, $sformatf("X jumped %0d -> %0d", x_prev, xc))
        x_prev = xc;
      end
    end
    `CHECK(done && int'(xc) == 65534, $sformatf("sweep did not end at 65534 (X=%0d)", xc))
    repeat (3) @(posedge clk); #1;
    `CHECK(!scanning && !laser && xc == 16'h8000, "back to idle after scan_complete")
    `CHECK(n_done == 1, $sformatf("scan_complete pulses %0d", n_done))
    `CHECK(n_halt == 31, $sformatf("halts %0d, expected 31", n_halt))
    `CHECK(n_flip > 100, "Y flips not seen")
    $display("INFO command enables %0d halts %0d flips %0d", n_ce, n_halt, n_flip);
    `TB_FINISH
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
