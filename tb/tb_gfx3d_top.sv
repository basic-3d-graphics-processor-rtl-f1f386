// tb_gfx3d_top: end-to-end test of gfx3d_top at its default size (512 x 576
// buffer, 1120 x 600 raster), driven through the Avalon slave port as the
// host processor would.
//
//  1. clear the screen, poll the finished flag, check the buffer is zero;
//  2. draw the 30 edges of a regular dodecahedron at angle 0 and compare the
//     buffer with a reference model (rotation, projection, Bresenham);
//  3. write a draw while a line is still being drawn (must be ignored);
//  4. clear, draw the dodecahedron turned by 7 steps plus lines that run off
//     screen or start behind the viewer, compare the buffer again;
//  5. capture a whole video frame from the serial TMDS lines, decode it and
//     compare every pixel with the buffer (each stored pixel shown twice).
// Drawing runs while the video side keeps reading the buffer. Each mechanism
// is counted; one that never happened counts as a failure.
module tb_gfx3d_top;
  import tb_ref_pkg::*;

  localparam int FB_W = 512, FB_H = 576;
  localparam int H_ACTIVE = 1024, H_TOTAL = 1120, V_ACTIVE = 576, V_TOTAL = 600;

  logic clk = 0, rst_n = 0, pix_clk = 0, pix_rst_n = 0, bit_clk = 0, bit_rst_n = 0;
  logic [2:0]  avs_address = 0;
  logic        avs_write = 0, avs_read = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic [3:0]  tmds_p, tmds_n;
  logic strobe;
  logic [9:0] rx_r, rx_g, rx_b;
  int div = 0;
  int checks = 0, failures = 0;
  bit img [][];

  // mechanism counters
  int n_clear = 0, n_draw = 0, n_rotated = 0, n_overlap = 0, n_clipped = 0, n_behind = 0;
  int n_dropped = 0, n_busy_seen = 0, n_frames = 0, n_hsync = 0, n_vsync = 0;
  int n_concurrent = 0;   // pixel clocks with drawing writes during active video

  gfx3d_top dut (.clk, .rst_n, .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
                 .pix_clk, .pix_rst_n, .bit_clk, .bit_rst_n, .tmds_p, .tmds_n);
  tmds_rx_model rx (.bit_clk, .tmds(tmds_p), .strobe, .sym_r(rx_r), .sym_g(rx_g), .sym_b(rx_b));

  // 400 MHz bit clock = 2 time units; pixel clock = bit clock / 10; clk 50 MHz.
  always #1 bit_clk = ~bit_clk;
  always @(posedge bit_clk) begin
    div <= (div == 9) ? 0 : div + 1;
    if (div == 0) pix_clk <= 1;
    if (div == 5) pix_clk <= 0;
  end
  always #8 clk = ~clk;

  // The video side reads the buffer while the drawing side writes it.
  always @(posedge pix_clk) if (dut.u_hdmi.de0 && dut.fa_we) n_concurrent++;

  initial begin
    repeat (30_000_000) @(posedge bit_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- Avalon host model --------------------------------------------------
  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk); avs_address = 3'(a); avs_writedata = v; avs_write = 1;
    @(negedge clk); avs_write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); avs_address = 3'(a); avs_read = 1;
    @(negedge clk); avs_read = 0; v = avs_readdata;
  endtask

  task automatic wait_finished();
    logic [31:0] v;
    int polls = 0;
    do begin rd(0, v); polls++; end while (v[0] == 0 && polls < 100000);
    if (polls > 1) n_busy_seen++;
    check(v[0] == 1, "operation finished");
  endtask

  function automatic logic [31:0] pack(input int x, input int y, input int z);
    return {2'b00, 10'(x), 10'(y), 10'(z)};
  endfunction

  // ---- reference model -----------------------------------------------------
  task automatic ref_clear();
    foreach (img[y, x]) img[y][x] = 0;
  endtask

  task automatic host_clear();
    wr(4, 32'd1);
    wait_finished();
    ref_clear();
    n_clear++;
  endtask

  task automatic host_line(input int x1, y1, z1, x2, y2, z2, a);
    int sx1, sy1, sx2, sy2, n, off, nb = 0, na = 0;
    project(x1, y1, z1, a, FB_W, FB_H, 256, sx1, sy1);
    project(x2, y2, z2, a, FB_W, FB_H, 256, sx2, sy2);
    foreach (img[y, x]) nb += int'(img[y][x]);
    draw_line(img, sx1, sy1, sx2, sy2, n, off);
    foreach (img[y, x]) na += int'(img[y][x]);
    if (na - nb < n - off) n_overlap++;
    if (off > 0) n_clipped++;
    if (z1 + 256 <= 0 || z2 + 256 <= 0) n_behind++;
    if (a != 0) n_rotated++;
    wr(1, pack(x1, y1, z1));
    wr(2, pack(x2, y2, z2));
    wr(3, 32'(a));
    wr(0, 32'd1);
    wait_finished();
    n_draw++;
  endtask

  task automatic compare_fb(input string what);
    int bad = 0;
    for (int y = 0; y < FB_H; y++)
      for (int x = 0; x < FB_W; x++)
        if (dut.u_fb.mem[y][x] != img[y][x]) bad++;
    check(bad == 0, $sformatf("%s: %0d pixels differ from the reference", what, bad));
  endtask

  // ---- dodecahedron ------------------------------------------------------------
  real vx [20], vy [20], vz [20];
  int  px [20], py [20], pz [20];

  task automatic make_dodecahedron(input real scale);
    real phi, iphi;
    int k = 0;
    phi = (1.0 + $sqrt(5.0)) / 2.0;
    iphi = 1.0 / phi;
    for (int i = 0; i < 8; i++) begin
      vx[k] = (i & 1) ? 1.0 : -1.0; vy[k] = (i & 2) ? 1.0 : -1.0; vz[k] = (i & 4) ? 1.0 : -1.0; k++;
    end
    for (int i = 0; i < 4; i++) begin
      real s1, s2;
      s1 = (i & 1) ? 1.0 : -1.0; s2 = (i & 2) ? 1.0 : -1.0;
      vx[k] = 0.0;       vy[k] = s1 * iphi; vz[k] = s2 * phi;  k++;
      vx[k] = s1 * iphi; vy[k] = s2 * phi;  vz[k] = 0.0;       k++;
      vx[k] = s1 * phi;  vy[k] = 0.0;       vz[k] = s2 * iphi; k++;
    end
    for (int i = 0; i < 20; i++) begin
      px[i] = int'($floor(vx[i] * scale + 0.5));
      py[i] = int'($floor(vy[i] * scale + 0.5));
      pz[i] = int'($floor(vz[i] * scale + 0.5));
    end
  endtask

  task automatic draw_dodecahedron(input int a, output int edges);
    real el, d2;
    el = 2.0 / ((1.0 + $sqrt(5.0)) / 2.0);   // edge length of the unit model
    edges = 0;
    for (int i = 0; i < 20; i++)
      for (int j = i + 1; j < 20; j++) begin
        d2 = (vx[i] - vx[j]) ** 2 + (vy[i] - vy[j]) ** 2 + (vz[i] - vz[j]) ** 2;
        if (d2 > el * el - 0.01 && d2 < el * el + 0.01) begin
          host_line(px[i], py[i], pz[i], px[j], py[j], pz[j], a);
          edges++;
        end
      end
  endtask

  // ---- video capture -----------------------------------------------------------
  bit capture_req = 0, capture_done = 0;
  int v_state = 0;          // 0 wait vsync, 1 capturing, 2 done
  int line = -1, col = 0, bad_pix = 0, n_sym = 0, frame_start = -1, frame_len = 0;
  bit in_data = 0, vs_prev = 0, hs_prev = 0;

  always @(posedge bit_clk) if (strobe && bit_rst_n && pix_rst_n) begin
    int cb;
    n_sym++;
    cb = tmds_ctrl(rx_b);
    if (cb >= 0) begin
      if (in_data) begin
        in_data = 0;
        if (v_state == 1 && col != H_ACTIVE) bad_pix += 1000000;
      end
      if (cb[0] && !hs_prev) n_hsync++;
      hs_prev = cb[0];
      if (cb[1] && !vs_prev) begin
        n_vsync++;
        if (frame_start >= 0) frame_len = n_sym - frame_start;
        frame_start = n_sym;
        if (v_state == 1) begin
          capture_done = 1;
          v_state = 2;
        end else if (v_state == 0 && capture_req) begin
          v_state = 1;
          line = -1;
          bad_pix = 0;
        end
      end
      vs_prev = cb[1];
    end else begin
      if (!in_data) begin in_data = 1; line++; col = 0; end
      if (v_state == 1) begin
        logic [7:0] vb, vg, vr;
        logic exp_px;
        vb = tmds_decode(rx_b); vg = tmds_decode(rx_g); vr = tmds_decode(rx_r);
        exp_px = dut.u_fb.mem[line][col / 2];
        if (!(vb == vg && vg == vr && vb == (exp_px ? 8'hFF : 8'h00))) bad_pix++;
      end
      col++;
    end
  end

  // ---- test sequence -------------------------------------------------------------
  initial begin
    int edges, ones;
    logic [31:0] v;
    img = new[FB_H];
    foreach (img[y]) img[y] = new[FB_W];
    repeat (10) @(negedge clk);
    rst_n = 1; bit_rst_n = 1;
    repeat (4) @(negedge pix_clk);
    pix_rst_n = 1;

    rd(0, v); check(v == 32'd1, "idle after reset");
    host_clear();
    compare_fb("after clear");

    make_dodecahedron(120.0);
    draw_dodecahedron(0, edges);
    check(edges == 30, $sformatf("dodecahedron has %0d edges", edges));
    compare_fb("dodecahedron, angle 0");

    // A draw written while a line is in progress must be dropped.
    wr(1, pack(-200, 0, 0)); wr(2, pack(200, 0, 0)); wr(3, 32'd0);
    wr(0, 32'd1);
    wr(1, pack(0, -200, 0)); wr(2, pack(0, 200, 0));
    wr(0, 32'd1);
    rd(0, v); check(v == 32'd0, "busy while drawing");
    wait_finished();
    begin int n, off; draw_line(img, 56, 288, 456, 288, n, off); end
    n_draw++;
    n_dropped++;
    compare_fb("second draw dropped while busy");

    host_clear();
    compare_fb("second clear");
    draw_dodecahedron(7, edges);
    host_line(-500, 400, -250, 500, -400, 300, 20);   // far off screen near the viewer
    host_line(100, 100, -300, 50, -50, 200, 0);        // starts behind the viewer
    host_line(-511, -511, 511, 511, 511, 511, 64);
    compare_fb("rotated dodecahedron and clipped lines");
    ones = 0;
    foreach (img[y, x]) ones += int'(img[y][x]);
    $display("pixels set: %0d", ones);
    check(ones > 1000, "picture is not empty");

    capture_req = 1;
    wait (capture_done);
    n_frames++;
    check(bad_pix == 0, $sformatf("video frame: %0d pixels differ from the buffer", bad_pix));
    check(line == V_ACTIVE - 1, $sformatf("video frame has %0d lines", line + 1));
    check(frame_len == H_TOTAL * V_TOTAL, $sformatf("frame length %0d symbols", frame_len));
    check(tmds_n == ~tmds_p, "tmds_n is the complement of tmds_p");

    $display("mechanisms: clear=%0d draw=%0d rotated=%0d overlap=%0d clipped=%0d behind=%0d dropped=%0d busy_polls=%0d frames=%0d hsync=%0d vsync=%0d concurrent=%0d",
             n_clear, n_draw, n_rotated, n_overlap, n_clipped, n_behind, n_dropped, n_busy_seen, n_frames, n_hsync, n_vsync, n_concurrent);
    check(n_clear > 0,     "clear happened");
    check(n_draw > 0,      "draw happened");
    check(n_rotated > 0,   "rotation happened");
    check(n_overlap > 0,   "read-modify-write kept earlier pixels");
    check(n_clipped > 0,   "off-screen pixels were skipped");
    check(n_behind > 0,    "point behind the viewer was projected");
    check(n_dropped > 0,   "command written while busy was dropped");
    check(n_busy_seen > 0, "finished flag read 0 while busy");
    check(n_frames > 0,    "a whole video frame was checked");
    check(n_hsync > 0 && n_vsync > 0, "sync pulses were sent");
    check(n_concurrent > 0, "drawing overlapped with video readout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
