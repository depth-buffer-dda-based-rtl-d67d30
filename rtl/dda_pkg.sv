// dda_pkg: types and constants shared by the 3D-DDA line scan-converter.
//
// Coordinates are unsigned fixed-point numbers with 8 integer and 8 fraction
// bits (8.8), as in the worked examples of the design: 0f.00h is 15.0.
// Coordinate differences are signed and one bit wider (17 bits) so that the
// full range -255.996 .. +255.996 is held exactly. Increments are signed 8.8
// (16 bits), for example ff.00h = -1.0. The screen is 128 x 128 pixels and
// every pixel holds one byte of intensity and one byte of depth.
package dda_pkg;

  localparam int unsigned INT_W   = 8;                 // integer bits of a coordinate
  localparam int unsigned FRAC_W  = 8;                 // fraction bits of a coordinate
  localparam int unsigned COORD_W = INT_W + FRAC_W;    // 16-bit 8.8 coordinate
  localparam int unsigned DIFF_W  = COORD_W + 1;       // 17-bit signed difference
  localparam int unsigned PIX_W   = INT_W;             // rounded coordinate width

  localparam int unsigned XRES_LOG2 = 7;               // 128 pixels per row
  localparam int unsigned YRES_LOG2 = 7;               // 128 rows
  localparam int unsigned ADDR_W    = XRES_LOG2 + YRES_LOG2;

  localparam int unsigned I_W = 8;                     // intensity byte
  localparam int unsigned Z_W = 8;                     // depth byte

  typedef logic [COORD_W-1:0]        coord_t;  // unsigned 8.8 coordinate
  typedef logic signed [DIFF_W-1:0]  diff_t;   // signed 9.8 difference
  typedef logic [DIFF_W-1:0]         mag_t;    // magnitude of a difference
  typedef logic signed [COORD_W-1:0] inc_t;    // signed 8.8 increment
  typedef logic [PIX_W-1:0]          pix_t;    // rounded integer coordinate

  // One end point of a line segment.
  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } vertex_t;

  // One entry of the depth buffer: intensity in the upper byte, depth below.
  typedef struct packed {
    logic [I_W-1:0] intensity;
    logic [Z_W-1:0] z;
  } dbuf_word_t;

endpackage
