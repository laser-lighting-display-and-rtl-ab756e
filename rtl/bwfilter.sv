// bwfilter: black-and-white threshold on one grey pixel.
//
// Pixels brighter than `threshold` become white (8'hFF), all others black
// (8'h00). Scanning happens in the dark, so the laser line on the object
// is by far the brightest thing in the picture and a single threshold,
// set from switches at run time, separates it from the background.
// Purely combinational.
module bwfilter (
  input  logic [7:0] pixel_in,
  input  logic [7:0] threshold,
  output logic [7:0] pixel_out
);

  always_comb pixel_out = (pixel_in > threshold) ? 8'hFF : 8'h00;

endmodule
