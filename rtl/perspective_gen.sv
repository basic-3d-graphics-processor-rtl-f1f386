// perspective_gen: first stage of the drawing pipeline. Turns a pair of 3D
// points into a pair of frame-buffer points.
//
// Both points are rotated about the Y axis by the requested angle (sin/cos
// from sincos_rom, rotation in rotator_y), then projected:
//
//   x' = x*D / (z + D),   y' = y*D / (z + D),   D = 256
//
// with one shared divider doing the four divisions in turn. The projected
// point is then moved to frame-buffer coordinates, origin at the centre of
// the 512x576 buffer and Y pointing up on screen:
//
//   X = FB_W/2 + x',   Y = FB_H/2 - y'
//
// The rotation, the projection formula with D = 256 and the single divider
// follow the original design. The screen mapping, clamping a denominator at or
// below zero (point at or behind the viewer) to 1, and saturating X and Y to
// 12-bit signed, are this design's choices.
//
// Interface: a start pulse while !busy captures p1, p2 and angle. About
// 4*(DIV_NW+3)+5 cycles later out_valid pulses for one cycle with q1/q2
// (held until the next start).
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the assertion's disable condition, not logic.
module perspective_gen
  import gfx_pkg::*;
#(
  parameter int D    = 256,
  parameter int FB_W = 512,
  parameter int FB_H = 576
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  point3_t            p1,
  input  point3_t            p2,
  input  logic [ANGLE_W-1:0] angle,
  output logic               busy,
  output logic               out_valid,
  output point2_t            q1,
  output point2_t            q2
);

  localparam int DIV_NW = 24;
  localparam int DIV_DW = 16;

  typedef enum logic [2:0] {
    P_IDLE,   // wait for start
    P_TRIG,   // sin/cos table lookup
    P_ROT1,   // rotate first point
    P_ROT2,   // capture first, rotate second
    P_ROTW,   // capture second
    P_DIV,    // start a division
    P_WAIT,   // wait for the divider
    P_OUT     // present result
  } pstate_e;

  pstate_e state;

  point3_t pa, pb;
  logic [ANGLE_W-1:0] ang;
  rpoint_t r_out, ra, rb;
  logic signed [TRIG_W-1:0] sin_q, cos_q;
  point3_t rot_in;
  logic [1:0] idx;             // 0: x1, 1: y1, 2: x2, 3: y2

  sincos_rom #(.ANGLE_STEPS(1 << ANGLE_W), .FRAC(TRIG_FRAC), .W(TRIG_W)) u_trig (
    .clk(clk), .angle(ang), .sin_q(sin_q), .cos_q(cos_q)
  );

  assign rot_in = (state == P_ROT1) ? pa : pb;

  rotator_y #(.FRAC(TRIG_FRAC)) u_rot (
    .clk(clk), .p(rot_in), .sin_q(sin_q), .cos_q(cos_q), .r(r_out)
  );

  // Operands of the current division.
  logic signed [DIV_NW-1:0] num;
  logic signed [DIV_DW-1:0] den;
  logic signed [DIV_NW-1:0] quot;
  logic div_start, div_busy, div_done;
  rpoint_t cur;
  rcoord_t cur_xy;
  logic signed [DIV_DW-1:0] zd;

  always_comb begin
    cur    = idx[1] ? rb : ra;
    cur_xy = idx[0] ? cur.y : cur.x;
    num    = DIV_NW'(cur_xy) * DIV_NW'(D);
    zd     = DIV_DW'(cur.z) + DIV_DW'(D);
    den    = (zd <= 0) ? DIV_DW'(1) : zd;
  end

  assign div_start = (state == P_DIV);

  divider #(.NW(DIV_NW), .DW(DIV_DW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .num(num), .den(den),
    .busy(div_busy), .done(div_done), .quot(quot)
  );

  // Screen mapping with saturation to the 12-bit signed screen range.
  localparam int SMAX = (1 <<< (RCOORD_W - 1)) - 1;
  localparam int SMIN = -(1 <<< (RCOORD_W - 1));
  logic signed [DIV_NW:0] scr;

  always_comb begin
    if (idx[0]) scr = (DIV_NW+1)'(FB_H / 2) - (DIV_NW+1)'(quot);
    else        scr = (DIV_NW+1)'(FB_W / 2) + (DIV_NW+1)'(quot);
  end

  function automatic rcoord_t sat(input logic signed [DIV_NW:0] v);
    if (v > (DIV_NW+1)'(SMAX))      return rcoord_t'(SMAX);
    else if (v < (DIV_NW+1)'(SMIN)) return rcoord_t'(SMIN);
    else               return rcoord_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= P_IDLE;
      pa        <= '0;
      pb        <= '0;
      ang       <= '0;
      ra        <= '0;
      rb        <= '0;
      idx       <= '0;
      q1        <= '0;
      q2        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        P_IDLE: if (start) begin
          pa    <= p1;
          pb    <= p2;
          ang   <= angle;
          state <= P_TRIG;
        end
        P_TRIG: state <= P_ROT1;
        P_ROT1: state <= P_ROT2;
        P_ROT2: begin
          ra    <= r_out;
          state <= P_ROTW;
        end
        P_ROTW: begin
          rb    <= r_out;
          idx   <= '0;
          state <= P_DIV;
        end
        P_DIV: state <= P_WAIT;
        P_WAIT: if (div_done) begin
          unique case (idx)
            2'd0: q1.x <= sat(scr);
            2'd1: q1.y <= sat(scr);
            2'd2: q2.x <= sat(scr);
            2'd3: q2.y <= sat(scr);
          endcase
          idx   <= idx + 1'b1;
          state <= (idx == 2'd3) ? P_OUT : P_DIV;
        end
        P_OUT: begin
          out_valid <= 1'b1;
          state     <= P_IDLE;
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy = (state != P_IDLE);

  // The shared divider is only started when it is free.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy);

endmodule
