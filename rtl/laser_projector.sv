// laser_projector: the galvanometer laser projector.
//
// A divider turns the system clock into the command rate (20,000 points
// per second at 27 MHz). The mouse position tracker feeds the trace loop,
// which records and replays a pattern; the scan sweep draws a vertical
// plane of light that moves across the field in steps requested by the
// image-processing side. projector_main selects one of the two by
// mode_scan, and the galvo interface shifts the selected X/Y pair to the
// two DACs once per command period, with the laser bit switched as the
// DACs load.
//
// Interface: mouse_* is one decoded PS/2 packet (motion and buttons);
// scan_start is the debounced "down" button; advance_in comes from the
// scanner and scan_complete goes back to it. dac_sclk is the inverted
// clock, dac_rst_n the inverted reset, as the DAC8871s expect. Timing:
// one DAC transfer of 16 clocks follows every command_enable.
module laser_projector
  import laser_pkg::*;
#(
  parameter int unsigned CMD_COUNT     = 1350,
  parameter int unsigned LOOP_COUNT    = 21600,
  parameter int unsigned TRACE_LOGSIZE = 7,
  parameter int unsigned Y_FLIP_COUNT  = 16,
  parameter int unsigned ADV_BITS      = 5,
  parameter int unsigned STOP_LSBS     = 11
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       mode_scan,
  input  logic       laser_arm,
  input  logic       scan_start,
  input  logic [8:0] mouse_dx,
  input  logic [8:0] mouse_dy,
  input  logic       mouse_ready,
  input  logic [2:0] mouse_btn,
  input  logic       advance_in,
  output logic       scan_complete,
  output logic       dac_sclk,
  output logic       dac_rst_n,
  output logic       dac_cs_n,
  output logic       dac_x_sdi,
  output logic       dac_y_sdi,
  output logic       laser,
  output logic       command_enable,
  output logic       scanning,
  output logic       sweep_halted,
  output logic       trace_step,
  output logic       point_stored,
  output logic       trace_clearing
);

  coord_t    mx, my, trace_x, trace_y;
  logic      trace_laser, sweep_laser, sel_laser;
  dac_word_t sweep_x, sweep_y, sel_x, sel_y;

  assign dac_sclk  = ~clk;
  assign dac_rst_n = ~rst;

  divider #(.MAX_COUNT(CMD_COUNT), .COUNT_BITS($clog2(CMD_COUNT) + 1)) u_cmd_div (
    .clk (clk),
    .rst (rst),
    .en  (1'b1),
    .tick(command_enable)
  );

  mouse_xy u_mouse (
    .clk       (clk),
    .rst       (rst),
    .dx        (mouse_dx),
    .dy        (mouse_dy),
    .data_ready(mouse_ready),
    .mx        (mx),
    .my        (my)
  );

  trace_loop #(.LOGSIZE(TRACE_LOGSIZE), .LOOP_COUNT(LOOP_COUNT)) u_trace (
    .clk         (clk),
    .rst         (rst),
    .mx          (mx),
    .my          (my),
    .btn_click   (mouse_btn),
    .x_out       (trace_x),
    .y_out       (trace_y),
    .laser       (trace_laser),
    .loop_enable (trace_step),
    .clearing    (trace_clearing),
    .loop_addr   (),
    .current_addr(),
    .point_stored(point_stored)
  );

  scan_sweep #(.Y_FLIP_COUNT(Y_FLIP_COUNT), .ADV_BITS(ADV_BITS), .STOP_LSBS(STOP_LSBS)) u_sweep (
    .clk           (clk),
    .rst           (rst),
    .start         (scan_start),
    .command_enable(command_enable),
    .advance_in    (advance_in),
    .x_cmd         (sweep_x),
    .y_cmd         (sweep_y),
    .laser         (sweep_laser),
    .scan_complete (scan_complete),
    .scanning      (scanning),
    .x_halted      (sweep_halted)
  );

  projector_main u_main (
    .clk        (clk),
    .rst        (rst),
    .mode_scan  (mode_scan),
    .laser_arm  (laser_arm),
    .trace_x    (trace_x),
    .trace_y    (trace_y),
    .trace_laser(trace_laser),
    .scan_x     (sweep_x),
    .scan_y     (sweep_y),
    .scan_laser (sweep_laser),
    .x_cmd      (sel_x),
    .y_cmd      (sel_y),
    .laser      (sel_laser)
  );

  galvo_interface u_galvo (
    .clk           (clk),
    .rst           (rst),
    .command_enable(command_enable),
    .x_cmd         (sel_x),
    .y_cmd         (sel_y),
    .laser_in      (sel_laser),
    .cs_n          (dac_cs_n),
    .x_sdi         (dac_x_sdi),
    .y_sdi         (dac_y_sdi),
    .laser_out     (laser),
    .busy          ()
  );

endmodule
