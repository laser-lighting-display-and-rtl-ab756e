// scan_control: divides the horizontal sweep into wedges.
//
// A counter of ADV_BITS bits counts the advance requests received from the
// image-processing side while a scan is active. The sweep may keep moving
// while the X command is below the stopping point formed by that counter
// as the most significant bits followed by STOP_LSBS ones; once X reaches
// the stopping point the sweep halts until the next advance request. With
// the defaults (5 + 11 bits) the stopping points are 2047, 4095, ... so the
// camera side gets a still laser plane at every stop to average frames.
// The counter clears on reset and when the scan completes.
//
// Timing: advance_x is registered, so it reacts one cycle after count_x or
// the advance counter changes. The bit split follows the document's
// description of the counter; the document also speaks of 16 wedges, which
// corresponds to ADV_BITS = 4 and STOP_LSBS = 12.
module scan_control #(
  parameter int unsigned ADV_BITS  = 5,
  parameter int unsigned STOP_LSBS = 11
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          scanning,
  input  logic                          scan_complete,
  input  logic                          advance_in,
  input  logic [ADV_BITS+STOP_LSBS-1:0] count_x,
  output logic                          advance_x
);

  logic [ADV_BITS-1:0] adv_count;

  always_ff @(posedge clk) begin
    if (rst || scan_complete)          adv_count <= '0;
    else if (advance_in && scanning)   adv_count <= adv_count + 1'b1;

    if (rst) advance_x <= 1'b0;
    else     advance_x <= (count_x < {adv_count, {STOP_LSBS{1'b1}}});
  end

endmodule
