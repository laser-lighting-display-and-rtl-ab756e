// tb_laser_projector: the projector end to end through its DAC bus, with
// the command period cut to 20 clocks and the loop period to 320 (16
// command periods, as in the full design). Two DAC models decode the
// serial words.
//  Trace mode: the mouse is moved with packets and two points are clicked;
//  the DACs must then cycle through exactly the recorded points and the
//  cursor, as 12-bit positions followed by four zero bits, with the laser
//  bit of each point (and no light at all when laser_arm is off).
//  Scan mode: a sweep is started; Y words must alternate 0x2000/0xE000,
//  X words must never decrease, the laser must be on, the sweep must halt
//  at its stops until advance_in, and end with one scan_complete.
// Every command_enable must produce exactly one 16-bit DAC frame.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_laser_projector;
  localparam int CC = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, mode = 0, arm = 1, start = 0, rdy = 0, adv = 0;
  logic [8:0] dx = 0, dy = 0; logic [2:0] btn = 0;
  logic done, sclk, rst_n, cs_n, xs, ys, las, ce, scanning, halted, step, stored, clearing;
  logic [15:0] xcode, ycode;
  int xl, yl, xbad, ybad, n_ce = 0, n_done = 0, n_halt = 0;
  logic prev_halted = 0;

  laser_projector #(.CMD_COUNT(CC), .LOOP_COUNT(16 * CC)) dut (
    .clk(clk), .rst(rst), .mode_scan(mode), .laser_arm(arm), .scan_start(start),
    .mouse_dx(dx), .mouse_dy(dy), .mouse_ready(rdy), .mouse_btn(btn), .advance_in(adv),
    .scan_complete(done), .dac_sclk(sclk), .dac_rst_n(rst_n), .dac_cs_n(cs_n),
    .dac_x_sdi(xs), .dac_y_sdi(ys), .laser(las), .command_enable(ce), .scanning(scanning),
    .sweep_halted(halted), .trace_step(step), .point_stored(stored), .trace_clearing(clearing));
  dac8871_model dac_x (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(xs), .code(xcode), .loads(xl), .bad_frames(xbad));
  dac8871_model dac_y (.sclk(sclk), .rst_n(rst_n), .cs_n(cs_n), .sdi(ys), .code(ycode), .loads(yl), .bad_frames(ybad));
  always #5 clk = ~clk;

  always @(negedge clk) if (!rst) begin
    if (ce) n_ce++;
    if (done) n_done++;
    if (halted && !prev_halted) n_halt++;
    prev_halted = halted;
  end

  task automatic move(int mdx, int mdy);
    dx <= 9'(mdx); dy <= 9'(mdy); rdy <= 1; @(posedge clk); rdy <= 0;
  endtask
  task automatic click(int b);
    btn[b] <= 1; repeat (5) @(posedge clk); btn[b] <= 0;
    while (!stored) @(posedge clk);
  endtask

  // collect the (x, y, laser) shown at each DAC load over some time
  typedef struct { logic [15:0] x, y; logic l; } pt_t;
  pt_t seen[$];
  always @(posedge cs_n) if (rst_n) seen.push_back('{xcode, ycode, las});

  initial begin
    int ce0, l0;
    repeat (3) @(posedge clk); rst <= 0;
    repeat (200) @(posedge clk);
    // cursor starts at 2047,2047; move to 2047+100, 2047+50 (axes inverted)
    move(-100, -50);
    click(2);                                  // point A, laser on
    move(250, 200);                            // to 1897, 1897
    click(0);                                  // point B, laser off
    move(-1, -1);                              // cursor 1898,1898
    ce0 = n_ce; l0 = xl;
    seen.delete();
    repeat (16 * CC * 12) @(posedge clk);
    `CHECK(xl - l0 >= n_ce - ce0 - 1 && xl - l0 <= n_ce - ce0, "one DAC frame per command enable")
    begin
      int na = 0, nb = 0, nc = 0;
      foreach (seen[i]) begin
        if (seen[i].x == {12'd2147, 4'h0} && seen[i].y == {12'd2097, 4'h0}) begin na++; `CHECK(seen[i].l, "A must be lit") end
        else if (seen[i].x == {12'd1897, 4'h0} && seen[i].y == {12'd1897, 4'h0}) begin nb++; `CHECK(!seen[i].l, "B must be dark") end
        else if (seen[i].x == {12'd1898, 4'h0} && seen[i].y == {12'd1898, 4'h0}) begin nc++; `CHECK(seen[i].l, "cursor lit") end
        else `CHECK(0, $sformatf("unexpected DAC word %h,%h", seen[i].x, seen[i].y))
      end
      `CHECK(na > 20 && nb > 20 && nc > 20, $sformatf("trace points shown %0d %0d %0d", na, nb, nc))
    end
    // laser_arm off: no light in trace mode
    arm <= 0; repeat (CC * 3) @(posedge clk); seen.delete();
    repeat (16 * CC * 4) @(posedge clk);
    foreach (seen[i]) `CHECK(!seen[i].l, "laser on while disarmed")
    // scan mode
    mode <= 1; arm <= 1;
    start <= 1; @(posedge clk); start <= 0;
    seen.delete();
    while (!done) begin
      @(posedge clk);
      if (halted) begin repeat (50) @(posedge clk); adv <= 1; @(posedge clk); adv <= 0; repeat (3) @(posedge clk); end
    end
    repeat (CC * 3) @(posedge clk);
    begin
      int bad_y = 0, back = 0; logic [15:0] px = 0;
      for (int i = 2; i < seen.size() - 3; i++) begin
        if (seen[i].y != 16'h2000 && seen[i].y != 16'hE000) bad_y++;
        if (seen[i].x < px) back++;
        px = seen[i].x;
        `CHECK(seen[i].l, "laser off during sweep")
      end
      `CHECK(bad_y == 0, $sformatf("%0d bad Y words", bad_y))
      `CHECK(back == 0, $sformatf("X went back %0d times", back))
      `CHECK(px >= 16'hFFF0, $sformatf("sweep ended at X=%h", px))
    end
    `CHECK(n_done == 1, "one scan_complete")
    `CHECK(n_halt == 31, $sformatf("%0d halts", n_halt))
    `CHECK(xbad == 0 && ybad == 0, "DAC frames of wrong length")
    `CHECK(xl == yl, "both DACs load together")
    $display("INFO dac loads %0d command enables %0d halts %0d", xl, n_ce, n_halt);
    `TB_FINISH
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
