// swept_plane_scanner: image side of the 3D scanner.
//
// The camera image arrives as a raster of 8-bit grey pixels with the
// display's hcount/vcount. bwfilter thresholds each pixel (threshold =
// switches 7:4 followed by four zeros); the all-ones test of the result is
// the 1-bit pixel. main_fsm steps the projector's laser plane and runs, at
// every stop, compare15 (15-frame vote into a 1-bit frame BRAM) and then
// line_det (midpoint of the laser line on every row), whose points go to
// point3d_zbt for conversion and storage in the external ZBT memory. The
// frame BRAM has a single port; its address comes from compare15 while
// compare15 is enabled, from line_det while line detection is enabled,
// and is zero otherwise. Only compare15 writes it.
//
// disp_pixel is the filtered image with a black border outside columns
// 10..719 and rows 10..500, registered one clock, for a monitor.
// Interface: advance_en goes to the projector, scan_complete comes from
// it; zbt_* is the write port of the point memory. The structure follows
// the document.
module swept_plane_scanner
  import laser_pkg::*;
#(
  parameter int unsigned FRAME_LOGSIZE = 19,
  parameter int unsigned H_SIZE        = 720,
  parameter int unsigned V_SIZE        = 501,
  parameter int unsigned FRAMES        = 15,
  parameter int unsigned WHITE_THRESH  = 10,
  parameter int unsigned X_START       = 40,
  parameter int unsigned X_STOP        = 680,
  parameter int unsigned Y_START       = 50,
  parameter int unsigned Y_STOP        = 450
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        scan_on,
  input  logic [3:0]  threshold_sw,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  vid_pixel,
  input  logic        scan_complete,
  output logic        advance_en,
  output logic [7:0]  disp_pixel,
  output logic        zbt_we,
  output logic [18:0] zbt_addr,
  output point3d_t    zbt_data,
  output logic        comp15_active,
  output logic        ld_active,
  output logic        line_pt_valid
);

  logic [7:0]               bw_pixel;
  logic                     comp15_en, comp15_done, ld_enable, ld_done, save_en;
  logic [FRAME_LOGSIZE-1:0] addr_c15, addr_ld, bram_addr;
  logic                     c15_data, c15_we, bram_dout;
  logic [9:0]               pt_x;
  logic [8:0]               pt_y;

  assign comp15_active = comp15_en;
  assign ld_active     = ld_enable;

  bwfilter u_bw (
    .pixel_in (vid_pixel),
    .threshold({threshold_sw, 4'b0000}),
    .pixel_out(bw_pixel)
  );

  bram #(.LOGSIZE(FRAME_LOGSIZE), .WIDTH(1)) u_frame (
    .clk (clk),
    .addr(bram_addr),
    .we  (c15_we),
    .din (c15_data),
    .dout(bram_dout)
  );

  compare15 #(.H_SIZE(H_SIZE), .V_SIZE(V_SIZE), .FRAMES(FRAMES),
              .WHITE_THRESH(WHITE_THRESH), .ADDR_BITS(FRAME_LOGSIZE)) u_c15 (
    .clk        (clk),
    .rst        (rst),
    .comp15_en  (comp15_en),
    .bwpixel    (&bw_pixel),
    .hcount     (hcount),
    .vcount     (vcount),
    .comp15_done(comp15_done),
    .bram_addr  (addr_c15),
    .bram_data  (c15_data),
    .bram_we    (c15_we)
  );

  line_det #(.H_SIZE(H_SIZE), .X_START(X_START), .X_STOP(X_STOP),
             .Y_START(Y_START), .Y_STOP(Y_STOP), .ADDR_BITS(FRAME_LOGSIZE)) u_ld (
    .clk          (clk),
    .rst          (rst),
    .ld_enable    (ld_enable),
    .bram_read    (bram_dout),
    .ld_done      (ld_done),
    .line_pt_valid(line_pt_valid),
    .bram_addr    (addr_ld),
    .x            (pt_x),
    .y            (pt_y)
  );

  always_comb begin
    if (comp15_en)      bram_addr = addr_c15;
    else if (ld_enable) bram_addr = addr_ld;
    else                bram_addr = '0;
  end

  point3d_zbt u_p3d (
    .clk        (clk),
    .rst        (rst),
    .save_en    (save_en),
    .point_valid(line_pt_valid),
    .x_in       (pt_x),
    .y_in       (pt_y),
    .zbt_we     (zbt_we),
    .zbt_addr   (zbt_addr),
    .zbt_data   (zbt_data)
  );

  main_fsm u_fsm (
    .clk          (clk),
    .rst          (rst),
    .scan_on      (scan_on),
    .comp15_done  (comp15_done),
    .ld_done      (ld_done),
    .scan_complete(scan_complete),
    .advance_en   (advance_en),
    .comp15_en    (comp15_en),
    .ld_enable    (ld_enable),
    .save_en      (save_en)
  );

  always_ff @(posedge clk) begin
    if (rst) disp_pixel <= '0;
    else     disp_pixel <= (hcount < 11'd10 || hcount > 11'd719 ||
                            vcount < 10'd10 || vcount > 10'd500) ? 8'h00 : bw_pixel;
  end

endmodule
