// tb_point3d_zbt: a non-trivial camera matrix, random points. Every ZBT
// write must hold the product of the matrix and (x, y, 1), truncated to 12
// bits per axis, with write enable high for exactly 3 clocks, at
// consecutive addresses from 0; dropping save_en restarts at address 0.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_point3d_zbt;
  import laser_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, save = 0, pv = 0;
  logic [9:0] xi = 0; logic [8:0] yi = 0;
  logic we; logic [18:0] addr; point3d_t data;
  point3d_t expq[$];
  int we_run = 0, nwrites = 0, exp_addr = 0, lat = 0, pv_cyc = 0, cyc = 0;

  point3d_zbt #(.M11(2), .M12(3), .M13(5), .M21(-1), .M22(4), .M23(7),
                .M31(1), .M32(1), .M33(9)) dut (
    .clk(clk), .rst(rst), .save_en(save), .point_valid(pv), .x_in(xi), .y_in(yi),
    .zbt_we(we), .zbt_addr(addr), .zbt_data(data));
  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pv) pv_cyc <= cyc;
    if (we) begin
      if (we_run == 0) begin
        point3d_t e;
        e = expq.pop_front();
        `CHECK(data == e, $sformatf("data %h expected %h", data, e))
        `CHECK(int'(addr) == exp_addr, $sformatf("addr %0d expected %0d", addr, exp_addr))
        `CHECK(cyc - pv_cyc == 3, $sformatf("write starts %0d clocks after point", cyc - pv_cyc))
      end
      we_run++;
    end else if (we_run != 0) begin
      `CHECK(we_run == 3, $sformatf("write held %0d clocks", we_run))
      we_run = 0; nwrites++; exp_addr++;
    end
  end

  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int scan = 0; scan < 2; scan++) begin
      save <= 1; repeat (2) @(posedge clk);
      exp_addr = 0;
      for (int i = 0; i < 50; i++) begin
        int x, y;
        point3d_t e;
        x = $urandom_range(0, 1023); y = $urandom_range(0, 511);
        e.x = 12'(2 * x + 3 * y + 5); e.y = 12'(-x + 4 * y + 7); e.z = 12'(x + y + 9);
        expq.push_back(e);
        xi <= 10'(x); yi <= 9'(y); pv <= 1; @(posedge clk); pv <= 0;
        repeat ($urandom_range(6, 12)) @(posedge clk);
      end
      save <= 0; repeat (3) @(posedge clk); #1;
      `CHECK(addr == 0 && !we, "save_en low must reset the address")
    end
    `CHECK(nwrites == 100 && expq.size() == 0, $sformatf("%0d writes", nwrites))
    `TB_FINISH
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
