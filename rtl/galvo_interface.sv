// galvo_interface: serial link to the two DAC8871 converters.
//
// On each command_enable the X and Y commands and the laser bit are
// captured. The link then drives chip select low for exactly DAC_BITS
// clocks and shifts both words out in parallel, most significant bit
// first, one bit per clock on x_sdi and y_sdi. The DACs are clocked with
// the inverted system clock, so they sample each bit on the falling edge
// of clk, in the middle of the bit. The laser blanking bit is updated
// together with the last data bit, and chip select returns high on the
// next clock, which makes both DACs load their new words at the same time
// the beam is switched. Capturing exactly 16 bits matters: one extra
// chip-select clock would shift the word and lose its MSB.
//
// Interface: command_enable must come at least DAC_BITS+1 clocks apart;
// a command_enable during a transfer is ignored. Timing: the first bit
// appears on the clock after command_enable, the transfer takes DAC_BITS
// clocks, and `busy` is high while chip select is low. The two-state FSM
// and MSB-first order follow the document; the shift-register form is
// this design's.
module galvo_interface #(
  parameter int unsigned DAC_BITS = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                command_enable,
  input  logic [DAC_BITS-1:0] x_cmd,
  input  logic [DAC_BITS-1:0] y_cmd,
  input  logic                laser_in,
  output logic                cs_n,
  output logic                x_sdi,
  output logic                y_sdi,
  output logic                laser_out,
  output logic                busy
);

  typedef enum logic {IDLE, TRANSMIT} state_t;
  state_t                      state;
  logic [DAC_BITS-1:0]         x_sh, y_sh;
  logic [$clog2(DAC_BITS)-1:0] remaining;
  logic                        laser_msg;

  assign busy = (state == TRANSMIT);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      cs_n      <= 1'b1;
      x_sdi     <= 1'b0;
      y_sdi     <= 1'b0;
      laser_out <= 1'b0;
      laser_msg <= 1'b0;
      x_sh      <= '0;
      y_sh      <= '0;
      remaining <= '0;
    end else begin
      unique case (state)
        IDLE: begin
          cs_n <= 1'b1;
          if (command_enable) begin
            state     <= TRANSMIT;
            cs_n      <= 1'b0;
            x_sdi     <= x_cmd[DAC_BITS-1];
            y_sdi     <= y_cmd[DAC_BITS-1];
            x_sh      <= x_cmd << 1;
            y_sh      <= y_cmd << 1;
            laser_msg <= laser_in;
            remaining <= ($clog2(DAC_BITS))'(DAC_BITS - 1);
          end
        end
        TRANSMIT: begin
          if (remaining == '0) begin
            state <= IDLE;
            cs_n  <= 1'b1;
          end else begin
            x_sdi     <= x_sh[DAC_BITS-1];
            y_sdi     <= y_sh[DAC_BITS-1];
            x_sh      <= x_sh << 1;
            y_sh      <= y_sh << 1;
            remaining <= remaining - 1'b1;
            if (remaining == 1) laser_out <= laser_msg;
          end
        end
      endcase
    end
  end

endmodule
