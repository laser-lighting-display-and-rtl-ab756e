// tb_bram: random reads and writes against an array model; checks the
// one-clock read latency and that a write returns the written word.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_bram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [6:0]  addr = 0;
  logic [24:0] din = 0, dout;
  logic [24:0] model [128];
  logic [24:0] expect_q;
  logic        expect_v = 0;

  bram dut (.clk(clk), .addr(addr), .we(we), .din(din), .dout(dout));
  always #5 clk = ~clk;

  initial begin
    // fill every address first
    for (int a = 0; a < 128; a++) begin
      addr <= 7'(a); we <= 1; din <= 25'($urandom); @(posedge clk);
      model[a] = din;
    end
    we <= 0;
    for (int i = 0; i < 3000; i++) begin
      logic [6:0] a; logic w; logic [24:0] d;
      a = 7'($urandom); w = ($urandom_range(0, 3) == 0); d = 25'($urandom);
      addr <= a; we <= w; din <= d;
      @(posedge clk);
      expect_q = w ? d : model[a];
      if (w) model[a] = d;
      #1;
      `CHECK(dout == expect_q, $sformatf("addr %0d dout %h expected %h", a, dout, expect_q))
    end
    `TB_FINISH
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
