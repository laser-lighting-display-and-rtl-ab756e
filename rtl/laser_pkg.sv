// laser_pkg: types and constants shared by the laser projector and the
// swept-plane scanner.
//
// The projector works in 16-bit DAC command words (the DAC8871 resolution);
// the mouse and the trace memory use 12-bit coordinates that are widened by
// appending four zero bits. The scanner works on a 720-pixel-wide camera
// window and stores 3D points as three 12-bit axes in one 36-bit word.
// The widths follow the document; the struct packing order of the trace
// memory entry (X, Y, laser bit) follows the document's BRAM description.
package laser_pkg;

  localparam int unsigned DAC_BITS   = 16;  // DAC8871 input word
  localparam int unsigned COORD_BITS = 12;  // mouse / trace coordinates
  localparam int unsigned AXIS_BITS  = 12;  // one axis of a stored 3D point
  localparam int unsigned CAM_WIDTH  = 720; // pixels per stored camera row

  typedef logic [DAC_BITS-1:0]   dac_word_t;
  typedef logic [COORD_BITS-1:0] coord_t;

  // One trace memory entry: 12-bit X, 12-bit Y, laser on/off (25 bits).
  typedef struct packed {
    coord_t x;
    coord_t y;
    logic   laser;
  } trace_entry_t;

  // One 3D point as written to the ZBT memory: {x, y, z}.
  typedef struct packed {
    logic [AXIS_BITS-1:0] x;
    logic [AXIS_BITS-1:0] y;
    logic [AXIS_BITS-1:0] z;
  } point3d_t;

  // Widen a 12-bit trace coordinate to a 16-bit DAC command.
  function automatic dac_word_t coord_to_dac(coord_t c);
    return {c, 4'b0000};
  endfunction

endpackage
