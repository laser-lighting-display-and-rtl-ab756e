// divider: programmable tick generator.
//
// A counter advances on every clock cycle in which `en` is high. When it
// has reached MAX_COUNT-1 it wraps to zero and `tick` is high for the
// following clock cycle, so one tick is produced every MAX_COUNT enabled
// cycles. With en tied high and the defaults (1350, 11 bits) this turns a
// 27 MHz clock into the 20,000 commands per second the galvanometers accept.
// The same module with MAX_COUNT = 21600 paces the trace loop, and with
// en = command_enable and MAX_COUNT = 16 it paces the vertical flip of the
// swept plane.
//
// The document clocks the Y-flip divider from the command-enable pulse
// itself, which makes its output a level lasting a whole command period;
// this design keeps everything on one clock and counts enable pulses
// instead, so every use of the divider produces a single-cycle tick.
//
// Timing: `tick` is registered; synchronous active-high reset clears both
// the counter and the tick.
module divider #(
  parameter int unsigned MAX_COUNT  = 1350,
  parameter int unsigned COUNT_BITS = 11
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick
);

  logic [COUNT_BITS-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (en) begin
      if (count == COUNT_BITS'(MAX_COUNT - 1)) begin
        count <= '0;
        tick  <= 1'b1;
      end else begin
        count <= count + 1'b1;
        tick  <= 1'b0;
      end
    end else begin
      tick <= 1'b0;
    end
  end

  initial assert (MAX_COUNT >= 2 && MAX_COUNT <= (1 << COUNT_BITS))
    else $error("divider: MAX_COUNT does not fit COUNT_BITS");

endmodule
