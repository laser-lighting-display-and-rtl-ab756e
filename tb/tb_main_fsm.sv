// tb_main_fsm: walks the scanner sequencer through several stops and
// checks its outputs in every state: advance_en is a one-clock pulse per
// stop, compare15 and line detection are enabled in turn until their
// done, save_en is high throughout, and both scan_complete and the switch
// return it to reset from any state.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_main_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, scan_on = 0, c15_done = 0, ld_done = 0, sc = 0;
  logic adv, c15_en, ld_en, save;
  int n_adv = 0;

  main_fsm dut (.clk(clk), .rst(rst), .scan_on(scan_on), .comp15_done(c15_done),
    .ld_done(ld_done), .scan_complete(sc), .advance_en(adv), .comp15_en(c15_en),
    .ld_enable(ld_en), .save_en(save));
  always #5 clk = ~clk;
  always @(negedge clk) if (adv) n_adv++;

  task automatic expect_out(logic a, logic c, logic l, logic s, string where);
    #1;
    `CHECK(adv == a && c15_en == c && ld_en == l && save == s,
           $sformatf("%s: adv=%0d c15=%0d ld=%0d save=%0d", where, adv, c15_en, ld_en, save))
  endtask

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    repeat (3) @(posedge clk); expect_out(0, 0, 0, 0, "idle");
    scan_on <= 1;
    @(posedge clk); expect_out(1, 0, 0, 1, "advance");
    for (int stop = 0; stop < 5; stop++) begin
      @(posedge clk); expect_out(0, 1, 0, 1, "compare15");
      repeat ($urandom_range(1, 20)) begin @(posedge clk); expect_out(0, 1, 0, 1, "compare15 wait"); end
      c15_done <= 1; @(posedge clk); c15_done <= 0; expect_out(0, 0, 1, 1, "line detect");
      repeat ($urandom_range(1, 20)) begin @(posedge clk); expect_out(0, 0, 1, 1, "line detect wait"); end
      ld_done <= 1; @(posedge clk); ld_done <= 0; expect_out(1, 0, 0, 1, "next advance");
    end
    // scan_complete during compare15
    @(posedge clk); expect_out(0, 1, 0, 1, "compare15");
    sc <= 1; @(posedge clk); sc <= 0; expect_out(0, 0, 0, 0, "scan_complete -> reset");
    @(posedge clk); expect_out(1, 0, 0, 1, "restart while switch on");
    // switch off during line detection
    @(posedge clk); c15_done <= 1; @(posedge clk); c15_done <= 0; expect_out(0, 0, 1, 1, "line detect");
    scan_on <= 0; @(posedge clk); expect_out(0, 0, 0, 0, "switch off -> reset");
    repeat (5) @(posedge clk); expect_out(0, 0, 0, 0, "stays reset");
    `CHECK(n_adv == 7, $sformatf("advance pulses %0d", n_adv))
    `TB_FINISH
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
