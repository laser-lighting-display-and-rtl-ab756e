// projector_main: chooses what the galvanometers draw.
//
// In trace mode (mode_scan = 0) the 12-bit trace-loop coordinates are
// widened to 16-bit DAC words by appending four zero bits; in scan mode the
// 16-bit commands of the scan sweep pass unchanged. The laser bit follows
// the selected source; in trace mode it is also gated by laser_arm (a
// switch that cuts laser power while tracing). The mouse position and
// button wiring into the trace loop live in the enclosing projector.
// Timing: the commands are registered (one clock of latency), as in the
// document; the laser bit is registered alongside them so that it stays
// aligned with its position.
module projector_main
  import laser_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      mode_scan,
  input  logic      laser_arm,
  input  coord_t    trace_x,
  input  coord_t    trace_y,
  input  logic      trace_laser,
  input  dac_word_t scan_x,
  input  dac_word_t scan_y,
  input  logic      scan_laser,
  output dac_word_t x_cmd,
  output dac_word_t y_cmd,
  output logic      laser
);

  always_ff @(posedge clk) begin
    if (rst) begin
      x_cmd <= '0;
      y_cmd <= '0;
      laser <= 1'b0;
    end else if (mode_scan) begin
      x_cmd <= scan_x;
      y_cmd <= scan_y;
      laser <= scan_laser;
    end else begin
      x_cmd <= coord_to_dac(trace_x);
      y_cmd <= coord_to_dac(trace_y);
      laser <= trace_laser && laser_arm;
    end
  end

endmodule
