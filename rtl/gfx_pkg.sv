// gfx_pkg: types and constants shared by the 3D line-drawing accelerator.
//
// A 3D point is three 10-bit signed coordinates, the width the register
// interface carries. After rotation about the Y axis a coordinate can grow by
// up to sqrt(2), so rotated points use 12 bits. Screen points are 12-bit
// signed as well: projection may land outside the 512x576 frame buffer, and
// the line generator clips pixel by pixel. Register offsets follow the
// original register map; the 12-bit widths and the screen-centre origin
// are choices of this design.
package gfx_pkg;

  localparam int COORD_W  = 10;   // register coordinate width
  localparam int RCOORD_W = 12;   // rotated / screen coordinate width
  localparam int ANGLE_W  = 7;    // 128 angle steps per turn
  localparam int TRIG_W   = 10;   // sin/cos word, signed
  localparam int TRIG_FRAC = 8;   // fraction bits of sin/cos (scale 256)

  typedef logic signed [COORD_W-1:0]  coord_t;
  typedef logic signed [RCOORD_W-1:0] rcoord_t;

  typedef struct packed {
    coord_t x;
    coord_t y;
    coord_t z;
  } point3_t;

  typedef struct packed {
    rcoord_t x;
    rcoord_t y;
    rcoord_t z;
  } rpoint_t;

  typedef struct packed {
    rcoord_t x;
    rcoord_t y;
  } point2_t;

  // Register offsets (word addresses) of the Avalon-MM slave.
  typedef enum logic [2:0] {
    REG_DRAW   = 3'd0,  // write 1: draw line; read: bit 0 = finished
    REG_POINT1 = 3'd1,
    REG_POINT2 = 3'd2,
    REG_ANGLE  = 3'd3,
    REG_CLEAR  = 3'd4
  } reg_addr_e;

  // Unpack the low 30 bits of a point register word: X [29:20], Y [19:10],
  // Z [9:0] (bits [31:30] of the word are ignored).
  function automatic point3_t unpack_point(input logic [29:0] w);
    point3_t p;
    p.x = w[29:20];
    p.y = w[19:10];
    p.z = w[9:0];
    return p;
  endfunction

endpackage
