// tb_line_det: the detector at its default size (720-pixel rows, window
// columns 40..680, rows 50..450) reading a 720 x 501 frame from a BRAM
// model with one clock of read latency. Every row between Y_START and Y_STOP gets random white
// runs (some rows none, some with equal longest runs, some touching the
// window edges). A reference search gives the midpoint start + len/2 of
// the first longest run; every reported point and its row must match,
// one point per row, rows taking (X_STOP - X_START + 2) clocks each.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_line_det;
  localparam int HS = 720, NR = 501, XS = 40, XE = 680, YS = 50, YE = 450;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, rd, done, pv;
  logic [18:0] addr;
  logic [9:0] x; logic [8:0] y;
  logic img[HS*NR];
  int exp_x[NR], npts = 0, last_pv = -1, cyc = 0;

  line_det dut (
    .clk(clk), .rst(rst), .ld_enable(en), .bram_read(rd), .ld_done(done),
    .line_pt_valid(pv), .bram_addr(addr), .x(x), .y(y));
  always #5 clk = ~clk;
  always @(posedge clk) begin
    rd <= img[addr];
    cyc <= cyc + 1;
    if (pv) begin
      npts++;
      `CHECK(int'(y) >= YS && int'(y) <= YE, $sformatf("row %0d out of range", y))
      if (int'(y) >= YS && int'(y) <= YE)
        `CHECK(int'(x) == exp_x[y], $sformatf("row %0d x=%0d expected %0d", y, x, exp_x[y]))
      `CHECK(int'(y) == YS + npts - 1, "rows out of order")
      if (last_pv >= 0) `CHECK(cyc - last_pv == XE - XS + 2, $sformatf("row took %0d clocks", cyc - last_pv))
      last_pv <= cyc;
    end
  end

  function automatic int ref_mid(int row);
    int best_s = 0, best_l = 0, s = 0, l = 0;
    for (int h = XS; h <= XE; h++) begin
      if (img[row * HS + h]) begin
        if (l == 0) s = h;
        l++;
      end else l = 0;
      if (l > best_l) begin best_l = l; best_s = s; end
    end
    return best_s + best_l / 2;
  endfunction

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      foreach (img[i]) img[i] = 0;
      for (int r = 0; r < NR; r++) begin
        int kind;
        kind = (r + pass) % 5;
        for (int h = 0; h < HS; h++)
          img[r * HS + h] = (kind == 0) ? 1'b0 : 1'($urandom_range(0, 99) < 30);
        if (kind == 1) begin  // solid laser line of random width
          int s, l;
          s = $urandom_range(XS - 5, XE - 30); l = $urandom_range(1, 30);
          for (int h = s; h < s + l; h++) img[r * HS + h] = 1;
        end
        if (kind == 2) for (int h = 0; h < HS; h++) img[r * HS + h] = (h % 6) < 3;  // ties
        if (kind == 3) for (int h = XE - 4; h < HS; h++) img[r * HS + h] = 1;       // run to the edge
        exp_x[r] = ref_mid(r);
      end
      npts = 0; last_pv = -1;
      rst <= (pass == 0); repeat (2) @(posedge clk); rst <= 0;
      en <= 1;
      while (!done) @(posedge clk);
      repeat (3) @(posedge clk); #1;
      `CHECK(done, "done held while enabled")
      `CHECK(npts == YE - YS + 1, $sformatf("%0d points", npts))
      en <= 0; repeat (2) @(posedge clk); #1;
      `CHECK(!done, "done released")
    end
    `TB_FINISH
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
