// tb_scan_control: the stop point is {advance count, 11 ones}. Random X
// values and advance requests are compared with that rule one clock later;
// advances outside a scan and scan_complete are also checked.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_scan_control;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, scanning = 0, done = 0, adv = 0, advance_x;
  logic [15:0] cx = 0;
  int n_adv = 0, n_stop = 0, n_go = 0;

  scan_control dut (.clk(clk), .rst(rst), .scanning(scanning), .scan_complete(done),
                    .advance_in(adv), .count_x(cx), .advance_x(advance_x));
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0; scanning <= 1;
    for (int i = 0; i < 3000; i++) begin
      int exp_limit;
      logic give;
      give = ($urandom_range(0, 99) < 2) && (n_adv < 31);
      cx  <= 16'($urandom_range(0, 65535) >> $urandom_range(0, 4));
      adv <= give;
      @(posedge clk);
      if (give) n_adv++;
      adv <= 0;
      @(posedge clk); #1;
      exp_limit = n_adv * 2048 + 2047;
      `CHECK(advance_x == (int'(cx) < exp_limit),
             $sformatf("x=%0d adv=%0d advance_x=%0d", cx, n_adv, advance_x))
      if (advance_x) n_go++; else n_stop++;
    end
    // not scanning: advances are ignored
    scanning <= 0; adv <= 1; @(posedge clk); adv <= 0; cx <= 16'(n_adv * 2048 + 2046);
    repeat (2) @(posedge clk); #1;
    `CHECK(advance_x == 1, "count below limit must advance")
    cx <= 16'(n_adv * 2048 + 2047); repeat (2) @(posedge clk); #1;
    `CHECK(advance_x == 0, "advance counted outside a scan")
    // scan_complete clears the counter
    done <= 1; @(posedge clk); done <= 0; cx <= 16'd2047; repeat (2) @(posedge clk); #1;
    `CHECK(advance_x == 0, "scan_complete did not clear the counter")
    cx <= 16'd2046; repeat (2) @(posedge clk); #1;
    `CHECK(advance_x == 1, "first wedge after clear")
    `CHECK(n_stop > 100 && n_go > 100, "both halt and go not exercised")
    `TB_FINISH
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
