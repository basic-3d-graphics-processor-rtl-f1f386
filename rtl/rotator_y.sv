// rotator_y: rotates a 3D point about the Y axis, one point per cycle.
//
//   x' = (x*cos + z*sin) >>> FRAC
//   y' =  y
//   z' = (z*cos - x*sin) >>> FRAC
//
// sin_q and cos_q are signed fixed point with FRAC fraction bits (from
// sincos_rom). Rotating about Y before projecting follows the original design;
// the sign convention, the arithmetic shift (rounds toward minus infinity)
// and the 12-bit result width are this design's choices. |x'| and |z'| stay
// below 512*sqrt(2) < 2048, so 12 signed bits always hold them.
// Timing: r is registered, valid one cycle after p, sin_q and cos_q.
module rotator_y
  import gfx_pkg::*;
#(
  parameter int FRAC = TRIG_FRAC
) (
  input  logic                     clk,
  input  point3_t                  p,
  input  logic signed [TRIG_W-1:0] sin_q,
  input  logic signed [TRIG_W-1:0] cos_q,
  output rpoint_t                  r
);

  localparam int PW = COORD_W + TRIG_W + 1;

  logic signed [PW-1:0] px, pz, s, c;
  logic signed [PW-1:0] xr_full, zr_full;

  always_comb begin
    px = PW'(p.x);
    pz = PW'(p.z);
    s  = PW'(sin_q);
    c  = PW'(cos_q);
    xr_full = px * c + pz * s;
    zr_full = pz * c - px * s;
  end

  always_ff @(posedge clk) begin
    r.x <= RCOORD_W'(xr_full >>> FRAC);
    r.y <= RCOORD_W'(p.y);
    r.z <= RCOORD_W'(zr_full >>> FRAC);
  end

endmodule
