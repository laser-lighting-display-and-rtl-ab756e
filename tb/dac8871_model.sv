// dac8871_model: behavioural model of one DAC8871 serial input, for
// testbenches. While cs_n is low it shifts sdi in, MSB first, on each
// rising edge of sclk; on the rising edge of cs_n it loads the last 16
// bits into `code` and counts the load. A frame of any length other than
// 16 bits is counted in `bad_frames`. The analog output is not modelled.
`timescale 1ns/1ps
module dac8871_model (
  input  logic        sclk,
  input  logic        rst_n,
  input  logic        cs_n,
  input  logic        sdi,
  output logic [15:0] code,
  output int          loads,
  output int          bad_frames
);
  logic [15:0] sh = '0;
  int          nbits = 0;

  initial begin
    code = 16'h0000;
    loads = 0;
    bad_frames = 0;
  end

  always @(posedge sclk) begin
    if (!rst_n) nbits = 0;
    else if (!cs_n) begin
      sh = {sh[14:0], sdi};
      nbits++;
    end
  end

  always @(posedge cs_n) begin
    if (rst_n && nbits != 0) begin
      if (nbits != 16) bad_frames++;
      code = sh;
      loads++;
    end
    nbits = 0;
  end
endmodule
