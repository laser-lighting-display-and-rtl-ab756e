// trace_loop: records mouse points and replays them as a laser trace.
//
// A 2**LOGSIZE x 25-bit memory holds the pattern: entries 0 .. current_addr-1
// are recorded points ({x, y, laser}), and entry current_addr is the live
// cursor. A divider produces a loop step every LOOP_COUNT clocks (16
// command periods, so the mirrors can settle after large jumps). At each
// step the memory is read at loop_addr and loop_addr advances; when
// loop_addr reaches current_addr the current mouse position is written
// there instead, the cursor is shown lit, and loop_addr wraps to zero.
//
// Recording: a left click arms "laser on" and a right click arms "laser
// off" for the next point. After the button is released, the next visit of
// the cursor entry stores the mouse position with the armed laser bit and
// advances current_addr, which freezes that point into the pattern. The
// cursor entry itself is always stored with the laser on. A full memory
// keeps overwriting its last entry.
//
// After reset a reset_bram sequencer writes zeros to every address while
// the loop is held; only then does the divider start.
//
// Interface: mx/my are 12-bit mouse coordinates, btn_click = {L, M, R}.
// Timing: the memory answers one cycle after the step; x_out, y_out and
// laser are registered from it and therefore change two clocks after each
// loop_enable and stay stable until the next step. How the click is
// committed (armed on press, stored at the next visit after release)
// follows the document; the single-cycle write and the saturating address
// are this design's choices.
module trace_loop
  import laser_pkg::*;
#(
  parameter int unsigned LOGSIZE    = 7,
  parameter int unsigned LOOP_COUNT = 21600
) (
  input  logic               clk,
  input  logic               rst,
  input  coord_t             mx,
  input  coord_t             my,
  input  logic [2:0]         btn_click,
  output coord_t             x_out,
  output coord_t             y_out,
  output logic               laser,
  output logic               loop_enable,
  output logic               clearing,
  output logic [LOGSIZE-1:0] loop_addr,
  output logic [LOGSIZE-1:0] current_addr,
  output logic               point_stored   // pulses when a point is frozen
);

  logic               hold;
  logic [LOGSIZE-1:0] clear_addr;
  logic [LOGSIZE-1:0] addr;
  logic               we, step_d;
  trace_entry_t       din, dout;
  logic               left_hold, right_hold, laser_reg;

  reset_bram #(.LOGSIZE(LOGSIZE)) u_clear (
    .clk       (clk),
    .rst       (rst),
    .hold      (hold),
    .clear_addr(clear_addr)
  );

  divider #(.MAX_COUNT(LOOP_COUNT), .COUNT_BITS($clog2(LOOP_COUNT) + 1)) u_loop_div (
    .clk (clk),
    .rst (rst || hold),
    .en  (1'b1),
    .tick(loop_enable)
  );

  bram #(.LOGSIZE(LOGSIZE), .WIDTH($bits(trace_entry_t))) u_mem (
    .clk (clk),
    .addr(addr),
    .we  (we),
    .din (din),
    .dout(dout)
  );

  assign clearing = hold;

  // Memory port: clearing, or the step access, else idle read of loop_addr.
  always_comb begin
    addr = loop_addr;
    we   = 1'b0;
    din  = '0;
    if (hold) begin
      addr = clear_addr;
      we   = 1'b1;
    end else if (loop_enable && loop_addr == current_addr) begin
      we  = 1'b1;
      din = '{x: mx, y: my,
              laser: ((left_hold && !btn_click[2]) || (right_hold && !btn_click[0]))
                     ? laser_reg : 1'b1};
    end
  end

  always_ff @(posedge clk) begin
    point_stored <= 1'b0;
    if (rst || hold) begin
      loop_addr    <= '0;
      current_addr <= '0;
      left_hold    <= 1'b0;
      right_hold   <= 1'b0;
      laser_reg    <= 1'b1;
      step_d       <= 1'b0;
      x_out        <= '0;
      y_out        <= '0;
      laser        <= 1'b0;
    end else begin
      step_d <= loop_enable;
      if (btn_click[2]) begin
        left_hold <= 1'b1;
        laser_reg <= 1'b1;
      end
      if (btn_click[0]) begin
        right_hold <= 1'b1;
        laser_reg  <= 1'b0;
      end
      if (loop_enable) begin
        if (loop_addr == current_addr) begin
          loop_addr <= '0;
          if ((left_hold && !btn_click[2]) || (right_hold && !btn_click[0])) begin
            left_hold    <= 1'b0;
            right_hold   <= 1'b0;
            laser_reg    <= 1'b1;
            point_stored <= 1'b1;
            if (current_addr != '1) current_addr <= current_addr + 1'b1;
          end
        end else begin
          loop_addr <= loop_addr + 1'b1;
        end
      end
      if (step_d) begin
        x_out <= dout.x;
        y_out <= dout.y;
        laser <= dout.laser;
      end
    end
  end

endmodule
