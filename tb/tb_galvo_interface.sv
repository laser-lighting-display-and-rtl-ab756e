// tb_galvo_interface: a model of the two DAC8871s samples SDI on the
// falling clock edge while CS is low and loads the word when CS rises.
// Every loaded word must equal the command, CS must stay low exactly 16
// clocks, the first bit must follow command_enable by one clock, and the
// laser output must carry the command's laser bit when CS rises.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_galvo_interface;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce = 0, las = 0;
  logic [15:0] xc = 0, yc = 0, xs, ys, xsh, ysh;
  logic cs_n, xsdi, ysdi, lout, busy, exp_las;
  int nbits = 0, low_cycles = 0, words = 0, ce_cyc = 0, cyc = 0, first_cyc = -1;
  logic cs_q = 1;

  galvo_interface dut (.clk(clk), .rst(rst), .command_enable(ce), .x_cmd(xc), .y_cmd(yc),
                       .laser_in(las), .cs_n(cs_n), .x_sdi(xsdi), .y_sdi(ysdi),
                       .laser_out(lout), .busy(busy));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ce) ce_cyc <= cyc;
  end

  // DAC model
  always @(negedge clk) begin
    if (!rst && !cs_n) begin
      if (nbits == 0) first_cyc = cyc;
      xsh = {xsh[14:0], xsdi}; ysh = {ysh[14:0], ysdi}; nbits++;
    end
    if (!rst && cs_n && !cs_q) begin
      `CHECK(nbits == 16, $sformatf("CS low for %0d clocks", nbits))
      `CHECK(xsh == xs && ysh == ys, $sformatf("DAC got %h/%h expected %h/%h", xsh, ysh, xs, ys))
      `CHECK(lout == exp_las, "laser bit not updated with the word")
      `CHECK(first_cyc == ce_cyc + 1, "first bit not one clock after command_enable")
      words++; nbits = 0;
    end
    cs_q = cs_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      xs = 16'($urandom); ys = 16'($urandom);
      if (i == 0) begin xs = 16'h8001; ys = 16'hFFFF; end
      exp_las = 1'($urandom);
      xc <= xs; yc <= ys; las <= exp_las; ce <= 1;
      @(posedge clk); ce <= 0; xc <= ~xs; las <= ~exp_las;  // inputs change after capture
      repeat (17 + $urandom_range(0, 5)) @(posedge clk);
    end
    repeat (5) @(posedge clk);
    `CHECK(words == 200, $sformatf("only %0d words loaded", words))
    `TB_FINISH
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
