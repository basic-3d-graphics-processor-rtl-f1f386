// tb_hdmi_out: hdmi_out on a small raster (16 x 8 buffer shown as 32 x 8 in a
// 44 x 12 frame) reading a random picture from a testbench memory. The serial
// lines are deserialised and decoded; two whole frames are rebuilt from the
// symbols and compared pixel by pixel with the picture (each stored pixel
// twice, white 0xFF / black 0x00 on all three channels). The hsync and vsync
// control bits on the blue channel must have the programmed lengths and the
// frame must repeat every H_TOTAL x V_TOTAL pixels.
module tb_hdmi_out;
  import tb_ref_pkg::*;

  localparam int FB_W = 16, FB_H = 8;
  localparam int H_ACTIVE = 32, H_TOTAL = 44, H_FP = 2, H_SYNC = 4;
  localparam int V_ACTIVE = 8, V_TOTAL = 12, V_FP = 1, V_SYNC = 2;

  logic bit_clk = 0, pix_clk = 0, pix_rst_n = 0, bit_rst_n = 0;
  logic [2:0] fb_addr;
  logic [FB_W-1:0] fb_rdata;
  logic [FB_W-1:0] mem [FB_H];
  logic [3:0] tmds;
  logic strobe;
  logic [9:0] rx_r, rx_g, rx_b;
  int div = 0;
  int checks = 0, failures = 0;

  hdmi_out #(.FB_W(FB_W), .FB_H(FB_H), .H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL), .H_FP(H_FP), .H_SYNC(H_SYNC),
             .V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL), .V_FP(V_FP), .V_SYNC(V_SYNC)) dut (
    .pix_clk, .pix_rst_n, .bit_clk, .bit_rst_n, .fb_addr, .fb_rdata, .tmds);
  tmds_rx_model rx (.bit_clk, .tmds, .strobe, .sym_r(rx_r), .sym_g(rx_g), .sym_b(rx_b));

  always #5 bit_clk = ~bit_clk;
  always @(posedge bit_clk) begin
    div <= (div == 9) ? 0 : div + 1;
    if (div == 0) pix_clk <= 1;
    if (div == 5) pix_clk <= 0;
  end
  always @(posedge pix_clk) fb_rdata <= mem[fb_addr];

  initial begin
    repeat (200000) @(posedge bit_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Symbol stream consumer.
  int n_sym = 0, vs_prev = 0, frames = 0, line = -1, col = 0, frame_start = -1;
  int hs_run = 0, vs_run = 0, bad_pix = 0, in_data = 0;
  bit capturing = 0;

  always @(posedge bit_clk) if (strobe && bit_rst_n) begin
    int cb;
    n_sym++;
    cb = tmds_ctrl(rx_b);
    if (cb >= 0) begin
      // blanking
      checks++;
      if (tmds_ctrl(rx_g) != 0 || tmds_ctrl(rx_r) != 0) begin failures++; $display("FAIL: G/R not control 0 in blanking"); end
      if (in_data) begin
        checks++;
        if (capturing && col != H_ACTIVE) begin failures++; $display("FAIL line %0d has %0d pixels", line, col); end
        in_data = 0;
      end
      if (cb[0]) hs_run++;
      else if (hs_run != 0) begin
        checks++;
        if (hs_run != H_SYNC) begin failures++; $display("FAIL hsync run %0d", hs_run); end
        hs_run = 0;
      end
      if (cb[1] && !vs_prev) begin
        if (frame_start >= 0) begin
          checks++;
          if (n_sym - frame_start != H_TOTAL * V_TOTAL) begin failures++; $display("FAIL frame length %0d", n_sym - frame_start); end
          if (capturing) begin
            checks += 2;
            if (line != V_ACTIVE - 1) begin failures++; $display("FAIL %0d lines", line + 1); end
            if (bad_pix != 0) begin failures++; $display("FAIL %0d pixels wrong", bad_pix); end
            frames++;
          end
        end
        frame_start = n_sym;
        capturing = 1;
        line = -1;
        bad_pix = 0;
      end
      if (cb[1]) vs_run++;
      else if (vs_run != 0) begin
        checks++;
        if (vs_run != V_SYNC * H_TOTAL) begin failures++; $display("FAIL vsync run %0d", vs_run); end
        vs_run = 0;
      end
      vs_prev = cb[1];
    end else begin
      logic [7:0] vb, vg, vr;
      if (!in_data) begin in_data = 1; line++; col = 0; end
      vb = tmds_decode(rx_b); vg = tmds_decode(rx_g); vr = tmds_decode(rx_r);
      if (capturing) begin
        logic exp_px;
        exp_px = mem[line][col / 2];
        if (!(vb == vg && vg == vr && vb == (exp_px ? 8'hFF : 8'h00))) bad_pix++;
      end
      col++;
    end
  end

  initial begin
    foreach (mem[y]) mem[y] = FB_W'($urandom);
    mem[0] = '1;
    mem[FB_H - 1] = 16'h8001;
    repeat (25) @(negedge bit_clk);
    bit_rst_n = 1;
    repeat (40) @(negedge bit_clk);
    pix_rst_n = 1;
    wait (frames == 2);
    checks++;
    $display("frames=%0d", frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
