// tb_swept_plane_scanner: the image side end to end on a small window
// (16 x 8 pixels in a 20 x 10 raster). The video shows a dark background
// (grey 20) with a bright laser line (grey 200) 3 pixels wide at a column
// that moves one pixel each time the scanner asks for an advance. The
// line flickers dark in 2 of every 15 frames and some background pixels
// flash bright in 5 of every 15 frames, so only the 15-frame vote removes
// the noise. After each stop the identity camera matrix must store one
// point {x, y, 1} per row, x being the line's centre, at consecutive ZBT
// addresses. A scan_complete after three stops must return the scanner
// to idle. The display output must black out the border.
`timescale 1ns/1ps
`include "tb/tb_check.svh"
module tb_swept_plane_scanner;
  import laser_pkg::*;
  localparam int H = 16, V = 8, HT = 20, VT = 10, XS = 1, XE = 14, YS = 1, YE = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, scan_on = 0, sc = 0;
  logic [10:0] hc = 0; logic [9:0] vc = 0; logic [7:0] pix, disp;
  logic adv, we, c15, ld, pv;
  logic [18:0] addr; point3d_t data;
  int frame = 0, col = 2, n_adv = 0, n_pts = 0, we_prev = 0, n_c15 = 0, n_ld = 0;
  logic c15_q = 0, ld_q = 0;

  swept_plane_scanner #(.H_SIZE(H), .V_SIZE(V), .X_START(XS), .X_STOP(XE), .Y_START(YS), .Y_STOP(YE)) dut (
    .clk(clk), .rst(rst), .scan_on(scan_on), .threshold_sw(4'h8), .hcount(hc), .vcount(vc),
    .vid_pixel(pix), .scan_complete(sc), .advance_en(adv), .disp_pixel(disp), .zbt_we(we),
    .zbt_addr(addr), .zbt_data(data), .comp15_active(c15), .ld_active(ld), .line_pt_valid(pv));
  always #5 clk = ~clk;

  always_comb begin
    int h, v, ph;
    h = int'(hc); v = int'(vc); ph = (7 * frame + 3 * h + v) % 15;
    if (h >= col && h < col + 3) pix = (ph < 13) ? 8'd200 : 8'd20;
    else if ((h * 7 + v * 3) % 5 == 0) pix = (ph < 5) ? 8'd230 : 8'd20;
    else pix = 8'd20;
  end

  always @(posedge clk) begin
    if (32'(hc) == HT - 1) begin
      hc <= 0;
      if (32'(vc) == VT - 1) begin vc <= 0; frame <= frame + 1; end
      else vc <= vc + 1;
    end else hc <= hc + 1;
  end

  // display border check: one clock of latency
  logic [10:0] hc_q; logic [9:0] vc_q; logic [7:0] pix_q;
  always @(posedge clk) begin
    hc_q <= hc; vc_q <= vc; pix_q <= pix;
    if (!rst && (hc_q < 10 || vc_q < 10))
      `CHECK(disp == 8'h00, "border not blacked out")
    c15_q <= c15; ld_q <= ld;
    if (!rst && c15 && !c15_q) n_c15++;
    if (!rst && ld && !ld_q) n_ld++;
  end

  always @(negedge clk) if (!rst) begin
    if (adv) begin n_adv++; col <= 2 + n_adv; end
    if (we && !we_prev) begin
      int row, c;
      row = n_pts % (YE - YS + 1) + YS;
      c   = 2 + n_pts / (YE - YS + 1) + 1 + 1;     // centre of the line after the advances so far
      `CHECK(int'(addr) == n_pts, $sformatf("ZBT address %0d expected %0d", addr, n_pts))
      `CHECK(data.x == 12'(c) && data.y == 12'(row) && data.z == 12'd1,
             $sformatf("point %0d: %0d,%0d,%0d expected %0d,%0d,1", n_pts, data.x, data.y, data.z, c, row))
      n_pts++;
    end
    we_prev = we;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 0;
    repeat (5) @(posedge clk);
    scan_on <= 1;
    while (n_adv < 4) @(posedge clk);
    repeat (20) @(posedge clk);
    `CHECK(n_pts == 3 * (YE - YS + 1), $sformatf("%0d points after 3 stops", n_pts))
    repeat (20) @(posedge clk);
    sc <= 1; @(posedge clk); sc <= 0; scan_on <= 0;
    repeat (5) @(posedge clk); #1;
    `CHECK(!c15 && !ld, "scanner idle after scan_complete")
    `CHECK(n_c15 == 4 && n_ld == 3, $sformatf("compare15 runs %0d, line detections %0d", n_c15, n_ld))
    $display("INFO frames %0d points %0d", frame, n_pts);
    `TB_FINISH
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("FAIL: watchdog"); `TB_FINISH
  end
endmodule
