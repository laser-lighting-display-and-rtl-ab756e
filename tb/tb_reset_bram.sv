// tb_reset_bram: after reset, hold must last exactly 128 clocks and
// clear_addr must present 0..127 in order, once each.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_reset_bram;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, hold;
  logic [6:0] ca;
  int n;

  reset_bram dut (.clk(clk), .rst(rst), .hold(hold), .clear_addr(ca));
  always #5 clk = ~clk;

  initial begin
    for (int round = 0; round < 2; round++) begin
      rst <= 1; repeat (2) @(posedge clk); rst <= 0;
      #1;
      n = 0;
      while (hold && n < 200) begin
        `CHECK(ca == 7'(n), $sformatf("clear address %0d expected %0d", ca, n))
        n++;
        @(posedge clk); #1;
      end
      `CHECK(n == 128, $sformatf("hold lasted %0d clocks", n))
      repeat (10) @(posedge clk); #1;
      `CHECK(!hold, "hold came back without reset")
    end
    `TB_FINISH
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
