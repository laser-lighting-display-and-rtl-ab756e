// line_det: finds the laser line in a noise-reduced frame.
//
// The frame BRAM holds one bit per pixel (1 = white) at row * H_SIZE +
// column. For every row from Y_START to Y_STOP the block reads the pixels
// from X_START to X_STOP, one per clock, and tracks runs of consecutive
// white pixels: the start and length of the current run and of the
// longest run seen so far on the row (the first one wins a tie). At the
// end of the row it outputs the midpoint of the longest run,
// x = start + length/2, with y = row, and pulses line_pt_valid for one
// clock. A row without white pixels reports x = 0. The laser plane is
// vertical, so each row crosses it once and the midpoint of the thickest
// white block is the line's centre on that row.
//
// Handshake: ld_enable starts a pass; ld_done rises after the last row
// and stays high until ld_enable drops. Timing: the BRAM answers one clock
// after the address, so the run logic works one clock behind the address
// counter; each row takes (X_STOP - X_START + 1) + 1 clocks. Window
// limits follow the document; the one-bubble-per-row pipeline and the
// run-length widths are this design's.
module line_det
  import laser_pkg::*;
#(
  parameter int unsigned H_SIZE    = CAM_WIDTH,
  parameter int unsigned X_START   = 40,
  parameter int unsigned X_STOP    = 680,
  parameter int unsigned Y_START   = 50,
  parameter int unsigned Y_STOP    = 450,
  parameter int unsigned ADDR_BITS = 19
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 ld_enable,
  input  logic                 bram_read,
  output logic                 ld_done,
  output logic                 line_pt_valid,
  output logic [ADDR_BITS-1:0] bram_addr,
  output logic [9:0]           x,
  output logic [8:0]           y
);

  typedef enum logic [1:0] {IDLE, SCAN, ROW_END, DONE} state_t;
  state_t                 state;
  logic [9:0]             xa;         // column being addressed
  logic [8:0]             ya;         // row being addressed
  logic [ADDR_BITS-1:0]   row_base;   // ya * H_SIZE
  logic                   d_valid, d_last;
  logic [9:0]             d_x;
  logic [9:0]             run_start, run_len, best_start, best_len;
  logic [9:0]             run_start_n, run_len_n;
  logic [9:0]             fin_start, fin_len;

  assign bram_addr = row_base + ADDR_BITS'(xa);

  // Current run including the pixel arriving now.
  always_comb begin
    run_start_n = run_start;
    run_len_n   = run_len;
    if (bram_read) begin
      if (run_len == '0) run_start_n = d_x;
      run_len_n = run_len + 1'b1;
    end
    // Longest run of the row once the last pixel is in.
    if (run_len_n > best_len) begin
      fin_start = run_start_n;
      fin_len   = run_len_n;
    end else begin
      fin_start = best_start;
      fin_len   = best_len;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= IDLE;
      ld_done       <= 1'b0;
      line_pt_valid <= 1'b0;
      x             <= '0;
      y             <= '0;
      xa            <= '0;
      ya            <= '0;
      row_base      <= '0;
      d_valid       <= 1'b0;
      d_last        <= 1'b0;
      d_x           <= '0;
      run_start     <= '0;
      run_len       <= '0;
      best_start    <= '0;
      best_len      <= '0;
    end else begin
      line_pt_valid <= 1'b0;
      d_valid       <= (state == SCAN);
      d_last        <= (state == SCAN) && (32'(xa) == X_STOP);
      d_x           <= xa;

      // Run tracking, one clock behind the address.
      if (d_valid) begin
        if (d_last) begin
          x             <= fin_start + (fin_len >> 1);
          y             <= ya;
          line_pt_valid <= 1'b1;
          run_len       <= '0;
          run_start     <= '0;
          best_len      <= '0;
          best_start    <= '0;
        end else if (bram_read) begin
          run_start <= run_start_n;
          run_len   <= run_len_n;
        end else begin
          if (run_len > best_len) begin
            best_len   <= run_len;
            best_start <= run_start;
          end
          run_len <= '0;
        end
      end

      unique case (state)
        IDLE: begin
          ld_done  <= 1'b0;
          xa       <= 10'(X_START);
          ya       <= 9'(Y_START);
          row_base <= ADDR_BITS'(Y_START * H_SIZE);
          if (ld_enable) state <= SCAN;
        end
        SCAN: begin
          if (!ld_enable)               state <= IDLE;
          else if (32'(xa) == X_STOP)   state <= ROW_END;
          else                          xa    <= xa + 1'b1;
        end
        ROW_END: begin
          // The last pixel of the row is being evaluated this clock.
          if (32'(ya) == Y_STOP) begin
            state   <= DONE;
            ld_done <= 1'b1;
          end else begin
            state    <= SCAN;
            xa       <= 10'(X_START);
            ya       <= ya + 1'b1;
            row_base <= row_base + ADDR_BITS'(H_SIZE);
          end
        end
        DONE: begin
          if (!ld_enable) begin
            state   <= IDLE;
            ld_done <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
