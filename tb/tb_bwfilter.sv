// tb_bwfilter: exhaustive over pixel and threshold values.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_bwfilter;
  int checks = 0, failures = 0;
  logic [7:0] p, t, o;
  bwfilter dut (.pixel_in(p), .threshold(t), .pixel_out(o));
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j += 3) begin
        p = 8'(i); t = 8'(j); #1;
        `CHECK(o == ((i > j) ? 8'hFF : 8'h00), $sformatf("pixel %0d thr %0d -> %h", i, j, o))
      end
    `TB_FINISH
  end
  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
