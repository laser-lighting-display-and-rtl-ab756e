// scan_sweep: generates the swept plane of laser light.
//
// Two states. In IDLE the laser is off and both mirrors are held at the
// centre of the field (X = Y = 0x8000). The start input (the "down" button)
// enters SCAN. In SCAN the laser is on; the Y command is a square wave
// between Y_LOW and Y_HIGH that flips every Y_FLIP_COUNT command enables,
// which gives the Y galvanometer time to travel the full height and draws a
// vertical plane of light; the X command is a 16-bit counter that steps
// once per command enable while scan_control allows it, moving the plane
// slowly across the object (about 3.3 s for the whole range at 20 kpps if
// never stopped). When X reaches X_END it is held for one more command
// period, so the end position is actually sent to the mirrors; on the next
// command enable scan_complete pulses for one cycle and the FSM returns to
// IDLE.
//
// Interface: command_enable is the 20 kpps tick; advance_in is the advance
// request from the image-processing side; x_cmd/y_cmd are DAC words.
// Timing: all outputs are registered. The centre and the two Y levels are
// read from the document's listing as 16-bit constants; the reset of the
// flip phase on leaving SCAN is this design's choice.
module scan_sweep
  import laser_pkg::*;
#(
  parameter int unsigned Y_FLIP_COUNT = 16,
  parameter dac_word_t   Y_HIGH       = 16'hE000,
  parameter dac_word_t   Y_LOW        = 16'h2000,
  parameter dac_word_t   CENTRE       = 16'h8000,
  parameter dac_word_t   X_END        = 16'd65534,
  parameter int unsigned ADV_BITS     = 5,
  parameter int unsigned STOP_LSBS    = 11
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  logic      command_enable,
  input  logic      advance_in,
  output dac_word_t x_cmd,
  output dac_word_t y_cmd,
  output logic      laser,
  output logic      scan_complete,
  output logic      scanning,
  output logic      x_halted      // sweep held at a stopping point
);

  typedef enum logic {IDLE, SCAN} state_t;
  state_t    state;
  dac_word_t count;
  logic      flip, flip_tick, advance_x;

  assign scanning = (state == SCAN);
  assign x_halted = scanning && !advance_x;

  divider #(.MAX_COUNT(Y_FLIP_COUNT), .COUNT_BITS($clog2(Y_FLIP_COUNT) + 1)) u_flip_div (
    .clk (clk),
    .rst (rst || state == IDLE),
    .en  (command_enable),
    .tick(flip_tick)
  );

  scan_control #(.ADV_BITS(ADV_BITS), .STOP_LSBS(STOP_LSBS)) u_scan_control (
    .clk          (clk),
    .rst          (rst),
    .scanning     (scanning),
    .scan_complete(scan_complete),
    .advance_in   (advance_in),
    .count_x      (count),
    .advance_x    (advance_x)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      count         <= '0;
      flip          <= 1'b0;
      laser         <= 1'b0;
      scan_complete <= 1'b0;
      x_cmd         <= CENTRE;
      y_cmd         <= CENTRE;
    end else begin
      unique case (state)
        IDLE: begin
          count         <= '0;
          flip          <= 1'b0;
          laser         <= 1'b0;
          scan_complete <= 1'b0;
          x_cmd         <= CENTRE;
          y_cmd         <= CENTRE;
          if (start) state <= SCAN;
        end
        SCAN: begin
          laser <= 1'b1;
          if (command_enable && advance_x && count != X_END) count <= count + 1'b1;
          if (flip_tick) flip <= ~flip;
          x_cmd <= count;
          y_cmd <= flip ? Y_HIGH : Y_LOW;
          if (scan_complete) begin
            scan_complete <= 1'b0;
            state         <= IDLE;
          end else if (count == X_END && command_enable) begin
            scan_complete <= 1'b1;
          end
        end
      endcase
    end
  end

endmodule
