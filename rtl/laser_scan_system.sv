// laser_scan_system: galvanometer laser projector and swept-plane 3D
// scanner on one clock.
//
// The projector either replays a mouse-drawn pattern with the laser or
// sweeps a vertical plane of laser light across an object. During a sweep
// the scanner's sequencer asks the projector to advance the plane one stop
// at a time (advance_en); at each stop it votes 15 camera frames into a
// 1-bit image, finds the laser line's centre on every row and stores a 3D
// point per row in the external ZBT memory. The projector reports the end
// of the sweep (scan_complete), which returns the scanner to idle.
//
// The two halves were separate boards linked by two wires; here they share
// one clock and the link is direct. External parts stay outside: the
// decoded PS/2 mouse packet, the video raster and pixel, the DAC8871 serial
// bus and the ZBT write port are ports. Inputs are expected debounced and
// synchronous to clk.
module laser_scan_system
  import laser_pkg::*;
#(
  parameter int unsigned CMD_COUNT     = 1350,
  parameter int unsigned LOOP_COUNT    = 21600,
  parameter int unsigned TRACE_LOGSIZE = 7,
  parameter int unsigned Y_FLIP_COUNT  = 16,
  parameter int unsigned ADV_BITS      = 5,
  parameter int unsigned STOP_LSBS     = 11,
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
  // projector controls
  input  logic        mode_scan,      // 0: trace mouse pattern, 1: sweep
  input  logic        laser_arm,      // laser power enable in trace mode
  input  logic        scan_start,     // start a sweep
  input  logic [8:0]  mouse_dx,
  input  logic [8:0]  mouse_dy,
  input  logic        mouse_ready,
  input  logic [2:0]  mouse_btn,      // {left, middle, right}
  // DAC8871 pair and laser diode
  output logic        dac_sclk,
  output logic        dac_rst_n,
  output logic        dac_cs_n,
  output logic        dac_x_sdi,
  output logic        dac_y_sdi,
  output logic        laser,
  // scanner controls and video
  input  logic        scan_on,
  input  logic [3:0]  threshold_sw,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  vid_pixel,
  output logic [7:0]  disp_pixel,
  // 3D point memory write port
  output logic        zbt_we,
  output logic [18:0] zbt_addr,
  output point3d_t    zbt_data,
  // status
  output logic        command_enable,
  output logic        scanning,
  output logic        sweep_halted,
  output logic        scan_complete,
  output logic        advance_en,
  output logic        trace_step,
  output logic        point_stored,
  output logic        trace_clearing,
  output logic        comp15_active,
  output logic        ld_active,
  output logic        line_pt_valid
);

  laser_projector #(
    .CMD_COUNT(CMD_COUNT), .LOOP_COUNT(LOOP_COUNT), .TRACE_LOGSIZE(TRACE_LOGSIZE),
    .Y_FLIP_COUNT(Y_FLIP_COUNT), .ADV_BITS(ADV_BITS), .STOP_LSBS(STOP_LSBS)
  ) u_projector (
    .clk           (clk),
    .rst           (rst),
    .mode_scan     (mode_scan),
    .laser_arm     (laser_arm),
    .scan_start    (scan_start),
    .mouse_dx      (mouse_dx),
    .mouse_dy      (mouse_dy),
    .mouse_ready   (mouse_ready),
    .mouse_btn     (mouse_btn),
    .advance_in    (advance_en),
    .scan_complete (scan_complete),
    .dac_sclk      (dac_sclk),
    .dac_rst_n     (dac_rst_n),
    .dac_cs_n      (dac_cs_n),
    .dac_x_sdi     (dac_x_sdi),
    .dac_y_sdi     (dac_y_sdi),
    .laser         (laser),
    .command_enable(command_enable),
    .scanning      (scanning),
    .sweep_halted  (sweep_halted),
    .trace_step    (trace_step),
    .point_stored  (point_stored),
    .trace_clearing(trace_clearing)
  );

  swept_plane_scanner #(
    .FRAME_LOGSIZE(FRAME_LOGSIZE), .H_SIZE(H_SIZE), .V_SIZE(V_SIZE), .FRAMES(FRAMES),
    .WHITE_THRESH(WHITE_THRESH), .X_START(X_START), .X_STOP(X_STOP),
    .Y_START(Y_START), .Y_STOP(Y_STOP)
  ) u_scanner (
    .clk          (clk),
    .rst          (rst),
    .scan_on      (scan_on),
    .threshold_sw (threshold_sw),
    .hcount       (hcount),
    .vcount       (vcount),
    .vid_pixel    (vid_pixel),
    .scan_complete(scan_complete),
    .advance_en   (advance_en),
    .disp_pixel   (disp_pixel),
    .zbt_we       (zbt_we),
    .zbt_addr     (zbt_addr),
    .zbt_data     (zbt_data),
    .comp15_active(comp15_active),
    .ld_active    (ld_active),
    .line_pt_valid(line_pt_valid)
  );

endmodule
