// compare15: temporal noise filter for a still camera frame.
//
// The laser line flickers at its edges from frame to frame. This block
// votes each pixel over FRAMES successive frames: it walks the capture
// window (H_SIZE x V_SIZE pixels) in raster order, one pixel at a time.
// For the current pixel it waits until the video raster (hcount, vcount)
// reaches that pixel, counts how often the thresholded input `bwpixel` is
// white there, and after FRAMES visits writes one bit to the frame BRAM:
// 1 if the white count is greater than WHITE_THRESH, else 0. It then moves
// to the next pixel. The BRAM address is row * H_SIZE + column, kept as a
// running counter since pixels are visited in order.
//
// Handshake: a rising request on comp15_en starts a pass from the top-left
// pixel; comp15_done rises when the last pixel has been written and stays
// high until comp15_en is dropped. Timing: a pixel's first visit falls in
// the frame of the previous pixel's last one, so each pixel adds FRAMES-1
// frames and a full pass takes about H_SIZE*V_SIZE*(FRAMES-1) frame times; the document's
// scanner accepts that slow rate. The write is one clock wide and happens
// on the clock after the FRAMES-th visit. Window, frame count and
// threshold follow the document; counting exactly FRAMES visits (rather
// than writing on an extra visit) and the level-held done are this
// design's choices.
module compare15
  import laser_pkg::*;
#(
  parameter int unsigned H_SIZE       = CAM_WIDTH,
  parameter int unsigned V_SIZE       = 501,
  parameter int unsigned FRAMES       = 15,
  parameter int unsigned WHITE_THRESH = 10,
  parameter int unsigned ADDR_BITS    = 19
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 comp15_en,
  input  logic                 bwpixel,
  input  logic [10:0]          hcount,
  input  logic [9:0]           vcount,
  output logic                 comp15_done,
  output logic [ADDR_BITS-1:0] bram_addr,
  output logic                 bram_data,
  output logic                 bram_we
);

  localparam int unsigned CW = $clog2(FRAMES + 1);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;
  state_t         state;
  logic [10:0]    h_int;
  logic [9:0]     v_int;
  logic [CW-1:0]  visits, whites;
  logic [CW-1:0]  whites_n;
  logic           at_pixel;

  assign at_pixel = (hcount == h_int) && (vcount == v_int);
  assign whites_n = whites + CW'(bwpixel);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      comp15_done <= 1'b0;
      bram_we     <= 1'b0;
      bram_data   <= 1'b0;
      bram_addr   <= '0;
      h_int       <= '0;
      v_int       <= '0;
      visits      <= '0;
      whites      <= '0;
    end else begin
      bram_we <= 1'b0;
      unique case (state)
        IDLE: begin
          comp15_done <= 1'b0;
          h_int       <= '0;
          v_int       <= '0;
          visits      <= '0;
          whites      <= '0;
          bram_addr   <= '0;
          if (comp15_en) state <= RUN;
        end
        RUN: begin
          if (bram_we) bram_addr <= bram_addr + 1'b1;  // previous write done
          if (!comp15_en) begin
            state <= IDLE;
          end else if (32'(v_int) >= V_SIZE) begin
            state       <= DONE;
            comp15_done <= 1'b1;
          end else if (at_pixel) begin
            if (32'(visits) == FRAMES - 1) begin
              bram_we   <= 1'b1;
              bram_data <= (32'(whites_n) > WHITE_THRESH);
              visits    <= '0;
              whites    <= '0;
              if (32'(h_int) == H_SIZE - 1) begin
                h_int <= '0;
                v_int <= v_int + 1'b1;
              end else begin
                h_int <= h_int + 1'b1;
              end
            end else begin
              visits <= visits + 1'b1;
              whites <= whites_n;
            end
          end
        end
        DONE: begin
          if (!comp15_en) begin
            state       <= IDLE;
            comp15_done <= 1'b0;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
