// tb_ref_pkg: reference models used by the testbenches, written from the
// mathematical definitions rather than from the RTL.
//  - sin_ref: round-half-away-from-zero of 256*sin(2*pi*k/128), using $sin.
//  - project: rotation about Y, perspective divide by (z+256), screen mapping.
//  - draw_line: Bresenham's algorithm into a bit image, skipping off-screen pixels.
//  - tmds_decode: inverse of the TMDS data encoding.
package tb_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  function automatic int sin_ref(input int k, input int steps = 128, input int frac = 8);
    real v;
    v = $sin(2.0 * PI * k / steps) * (1 << frac);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  function automatic int cos_ref(input int k, input int steps = 128, input int frac = 8);
    return sin_ref((k + steps / 4) % steps, steps, frac);
  endfunction

  function automatic int floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return int'(q);
  endfunction

  function automatic int sat12(input longint v);
    if (v > 2047) return 2047;
    if (v < -2048) return -2048;
    return int'(v);
  endfunction

  // 3D point (x, y, z) at angle index a -> screen (sx, sy).
  task automatic project(input int x, input int y, input int z, input int a,
                         input int fb_w, input int fb_h, input int d,
                         output int sx, output int sy);
    int s, c, xr, zr, den;
    longint qx, qy;
    s  = sin_ref(a);
    c  = cos_ref(a);
    xr = floor_div(longint'(x) * c + longint'(z) * s, 256);
    zr = floor_div(longint'(z) * c - longint'(x) * s, 256);
    den = zr + d;
    if (den <= 0) den = 1;
    qx = (longint'(xr) * d) / den;
    qy = (longint'(y) * d) / den;
    sx = sat12(fb_w / 2 + qx);
    sy = sat12(fb_h / 2 - qy);
  endtask

  // Bresenham; returns the number of pixels the line has (on screen or not)
  // and the number of them that fell outside the image.
  task automatic draw_line(ref bit img [][], input int x0, input int y0,
                           input int x1, input int y1, output int n, output int off);
    int dx, dy, sx, sy, err, e2;
    dx = (x1 > x0) ? x1 - x0 : x0 - x1;
    dy = (y1 > y0) ? y1 - y0 : y0 - y1;
    sx = (x0 < x1) ? 1 : -1;
    sy = (y0 < y1) ? 1 : -1;
    err = dx - dy;
    n = 0;
    off = 0;
    forever begin
      n++;
      if (y0 >= 0 && y0 < img.size() && x0 >= 0 && x0 < img[0].size()) img[y0][x0] = 1'b1;
      else off++;
      if (x0 == x1 && y0 == y1) break;
      e2 = 2 * err;
      if (e2 > -dy) begin err -= dy; x0 += sx; end
      if (e2 < dx)  begin err += dx; y0 += sy; end
    end
  endtask

  function automatic logic [7:0] tmds_decode(input logic [9:0] q);
    logic [7:0] t, d;
    t = q[9] ? ~q[7:0] : q[7:0];
    d[0] = t[0];
    for (int i = 1; i < 8; i++) d[i] = q[8] ? (t[i] ^ t[i-1]) : ~(t[i] ^ t[i-1]);
    return d;
  endfunction

  // Control symbol -> c[1:0], or -1 if q is not a control symbol.
  function automatic int tmds_ctrl(input logic [9:0] q);
    case (q)
      10'b1101010100: return 0;
      10'b0010101011: return 1;
      10'b0101010100: return 2;
      10'b1010101011: return 3;
      default:        return -1;
    endcase
  endfunction

endpackage
