// point3d_zbt: turns line points into 3D points and stores them.
//
// While save_en is high the block waits for line points from line_det.
// Each point (x_in, y_in) is captured on point_valid and multiplied, as
// the homogeneous vector (x, y, 1), by a 3x3 camera matrix M11..M33 given
// as integer parameters:
//   X = M11*x + M12*y + M13,  Y = M21*x + M22*y + M23,  Z = M31*x + M32*y + M33.
// Each result is kept to 12 bits and the word {X, Y, Z} (36 bits) is
// written to the external ZBT memory at the next address. The write
// enable, address and data are held for WRITE_HOLD clocks, because a
// single-clock write was not reliable on the ZBT; the address then
// advances by one. Dropping save_en returns the block to reset, which
// restarts the address at zero for the next scan.
//
// The default matrix is the identity, a placeholder for an ideal pinhole
// camera until a calibration supplies real values. Timing: CALC takes one
// clock, the write WRITE_HOLD clocks, so a point is stored WRITE_HOLD + 2
// clocks after point_valid; points must come at least that far apart
// (line_det delivers one per camera row). The Z row uses the point's
// coordinates like the other two rows, which is this design's reading of
// the matrix product.
module point3d_zbt
  import laser_pkg::*;
#(
  parameter int M11 = 1, parameter int M12 = 0, parameter int M13 = 0,
  parameter int M21 = 0, parameter int M22 = 1, parameter int M23 = 0,
  parameter int M31 = 0, parameter int M32 = 0, parameter int M33 = 1,
  parameter int unsigned WRITE_HOLD = 3
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        save_en,
  input  logic        point_valid,
  input  logic [9:0]  x_in,
  input  logic [8:0]  y_in,
  output logic        zbt_we,
  output logic [18:0] zbt_addr,
  output point3d_t    zbt_data
);

  typedef enum logic [1:0] {S_RESET, S_STANDBY, S_CALC, S_WRITE} state_t;
  state_t      state;
  logic [9:0]  x_hold;
  logic [8:0]  y_hold;
  logic [$clog2(WRITE_HOLD + 1)-1:0] hold_cnt;
  point3d_t    result;

  // Homogeneous product, truncated to 12 bits per axis.
  function automatic logic [AXIS_BITS-1:0] row(int a, int b, int c,
                                               logic [9:0] px, logic [8:0] py);
    int acc;
    acc = a * int'(px) + b * int'(py) + c;
    return AXIS_BITS'(acc);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_RESET;
      zbt_we   <= 1'b0;
      zbt_addr <= '0;
      zbt_data <= '0;
      x_hold   <= '0;
      y_hold   <= '0;
      hold_cnt <= '0;
      result   <= '0;
    end else begin
      unique case (state)
        S_RESET: begin
          zbt_we   <= 1'b0;
          zbt_addr <= '0;
          zbt_data <= '0;
          if (save_en) state <= S_STANDBY;
        end
        S_STANDBY: begin
          zbt_we <= 1'b0;
          if (!save_en) begin
            state <= S_RESET;
          end else if (point_valid) begin
            x_hold <= x_in;
            y_hold <= y_in;
            state  <= S_CALC;
          end
        end
        S_CALC: begin
          result.x <= row(M11, M12, M13, x_hold, y_hold);
          result.y <= row(M21, M22, M23, x_hold, y_hold);
          result.z <= row(M31, M32, M33, x_hold, y_hold);
          hold_cnt <= '0;
          state    <= S_WRITE;
        end
        S_WRITE: begin
          zbt_data <= result;
          if (32'(hold_cnt) == WRITE_HOLD) begin
            zbt_we   <= 1'b0;
            zbt_addr <= zbt_addr + 1'b1;
            state    <= S_STANDBY;
          end else begin
            zbt_we   <= 1'b1;
            hold_cnt <= hold_cnt + 1'b1;
          end
        end
        default: state <= S_RESET;
      endcase
    end
  end

  // A new point may only arrive while the block is waiting for one.
  property no_point_while_busy;
    @(posedge clk) disable iff (rst)
      (point_valid && save_en) |-> (state == S_STANDBY || state == S_RESET);
  endproperty
  assert property (no_point_while_busy)
    else $error("point3d_zbt: point_valid while a point is being stored");

endmodule
