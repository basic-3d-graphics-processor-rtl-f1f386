// line_gen: second stage of the drawing pipeline. Draws a straight line
// between two screen points with Bresenham's algorithm, one pixel at a time,
// into the one-bit-per-pixel frame buffer, and clears the buffer on request.
//
// The state machine has the six states of the original design:
//   S0 idle; S1 width and height; S2 line direction (step signs and initial
//   error); S3 write the current point; S4 step to the next
//   point; S5 clear the screen.
// Both end points, the first being the start point, are captured as draw is
// taken in S0. S0 -draw-> S1 -> S2 -> S3; S3 -> S4 -> S3 while the current point is not the
// end point; S3 -> S0 once it is. S0 -clear-> S5 -> S0.
//
// S3 is a read-modify-write of one frame-buffer row: the row y is read, bit x
// of the row is set (OR keeps the pixels already drawn) and the row is written
// back. It takes two cycles, read then write, tracked by a phase bit. A pixel
// outside the buffer is passed over in one cycle without a memory access.
// S5 writes zeros to one row per cycle, FB_H cycles.
//
// The states, the read-modify-write with OR and the algorithm follow the
// original design. The error-term form (err = dx-dy, e2 = 2*err), the clipping of
// off-screen pixels and clear having priority over draw are this design's
// choices.
//
// Timing: draw or clear is taken in S0 only; done pulses for one cycle as the
// machine returns to S0. For a line of n pixels, all on screen, done is high
// 3n+1 cycles after the cycle in which draw was taken (S1, S2, then per pixel
// the two S3 cycles and one S4, with no S4 after the last pixel); for a clear
// it is FB_H cycles. The frame-buffer port must return read data one cycle
// after the address.
module line_gen
  import gfx_pkg::*;
#(
  parameter int FB_W = 512,
  parameter int FB_H = 576,
  localparam int AW  = $clog2(FB_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          draw,
  input  logic          clear,
  input  point2_t       q1,
  input  point2_t       q2,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] fb_addr,
  output logic          fb_we,
  output logic [FB_W-1:0] fb_wdata,
  input  logic [FB_W-1:0] fb_rdata
);

  typedef enum logic [2:0] {S0, S1, S2, S3, S4, S5} lstate_e;

  localparam int EW = RCOORD_W + 3;   // error term and deltas
  typedef logic signed [EW-1:0] e_t;

  lstate_e state;
  logic    phase;                      // S3: 0 = read, 1 = write
  point2_t p0, pe;                     // current and end point
  e_t      dx, dy, err;
  logic    sx_neg, sy_neg;             // step direction is -1
  logic [AW-1:0] row;                  // S5 row counter

  logic on_screen, at_end;
  e_t   e2, ex, ey;
  assign on_screen = (p0.x >= 0) && (p0.x < rcoord_t'(FB_W)) && (p0.y >= 0) && (p0.y < rcoord_t'(FB_H));
  assign at_end    = (p0.x == pe.x) && (p0.y == pe.y);
  assign ex        = e_t'(pe.x) - e_t'(p0.x);
  assign ey        = e_t'(pe.y) - e_t'(p0.y);
  assign e2        = err <<< 1;

  always_comb begin
    fb_addr  = (state == S5) ? row : AW'(p0.y);
    fb_we    = (state == S5) || (state == S3 && phase);
    fb_wdata = (state == S5) ? '0
             : (fb_rdata | (FB_W'(1) << p0.x[$clog2(FB_W)-1:0]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S0;
      phase  <= 1'b0;
      p0     <= '0;
      pe     <= '0;
      dx     <= '0;
      dy     <= '0;
      err    <= '0;
      sx_neg <= 1'b0;
      sy_neg <= 1'b0;
      row    <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S0: begin
          if (clear) begin
            row   <= '0;
            state <= S5;
          end else if (draw) begin
            p0    <= q1;
            pe    <= q2;
            state <= S1;
          end
        end
        S1: begin                     // width, height (start point taken in S0)
          dx    <= (ex < 0) ? -ex : ex;
          dy    <= (ey < 0) ? -ey : ey;
          state <= S2;
        end
        S2: begin                     // direction and initial error
          sx_neg <= ex < 0;
          sy_neg <= ey < 0;
          err    <= dx - dy;
          phase  <= 1'b0;
          state  <= S3;
        end
        S3: begin
          if (on_screen && !phase) begin
            phase <= 1'b1;            // row read issued this cycle
          end else begin
            phase <= 1'b0;            // row written this cycle (or skipped)
            if (at_end) begin
              state <= S0;
              done  <= 1'b1;
            end else begin
              state <= S4;
            end
          end
        end
        S4: begin
          if (e2 > -dy && e2 < dx) begin
            err  <= err - dy + dx;
            p0.x <= sx_neg ? p0.x - 1'b1 : p0.x + 1'b1;
            p0.y <= sy_neg ? p0.y - 1'b1 : p0.y + 1'b1;
          end else if (e2 > -dy) begin
            err  <= err - dy;
            p0.x <= sx_neg ? p0.x - 1'b1 : p0.x + 1'b1;
          end else if (e2 < dx) begin
            err  <= err + dx;
            p0.y <= sy_neg ? p0.y - 1'b1 : p0.y + 1'b1;
          end
          state <= S3;
        end
        S5: begin
          row <= row + 1'b1;
          if (row == AW'(FB_H - 1)) begin
            state <= S0;
            done  <= 1'b1;
          end
        end
        default: state <= S0;
      endcase
    end
  end

  assign busy = (state != S0);

endmodule
