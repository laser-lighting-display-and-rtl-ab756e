// mouse_xy: absolute laser-cursor position from PS/2 mouse motion.
//
// Each decoded mouse packet carries 9-bit two's complement X and Y motion.
// On `data_ready` the magnitude of each motion is added to or subtracted
// from a 12-bit unsigned position that saturates at 0 and at MAX_X / MAX_Y.
// Both axes are inverted relative to a video cursor (a positive dx moves
// the position down, a positive dy moves it down), because the projector's
// mirrors see the scene mirrored. The full 12-bit range (4095) is used so
// that the cursor covers the whole projection field.
//
// Interface: dx, dy, data_ready and buttons come from a PS/2 packet
// decoder (not part of this design). Timing: position updates one cycle
// after data_ready; synchronous reset puts the cursor at the centre.
module mouse_xy
  import laser_pkg::*;
#(
  parameter int unsigned MAX_X = 4095,
  parameter int unsigned MAX_Y = 4095
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [8:0] dx,
  input  logic [8:0] dy,
  input  logic       data_ready,
  output coord_t     mx,
  output coord_t     my
);

  logic       sx, sy;
  logic [8:0] mag_x, mag_y;

  always_comb begin
    sx    = dx[8];
    sy    = dy[8];
    mag_x = sx ? 9'(~dx + 9'd1) : dx;
    mag_y = sy ? 9'(~dy + 9'd1) : dy;
  end

  // Inverted axis: negative motion increases the position.
  function automatic coord_t step(coord_t pos, logic neg, logic [8:0] mag,
                                  int unsigned maxv);
    logic [12:0] up;
    up = {1'b0, pos} + {4'b0, mag};
    if (neg) return (up > 13'(maxv)) ? coord_t'(maxv) : up[11:0];
    else     return ({4'b0, mag} > {1'b0, pos}) ? '0 : pos - coord_t'(mag);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mx <= coord_t'(MAX_X / 2);
      my <= coord_t'(MAX_Y / 2);
    end else if (data_ready) begin
      mx <= step(mx, sx, mag_x, MAX_X);
      my <= step(my, sy, mag_y, MAX_Y);
    end
  end

endmodule
