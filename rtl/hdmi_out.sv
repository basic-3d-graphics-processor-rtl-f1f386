// hdmi_out: HDMI video output of the frame buffer.
//
// video_timing scans a 1120 x 600 raster with a 1024 x 576 picture. Because
// the frame buffer stores whole screen lines, the output addresses one buffer
// row per line: from the start of horizontal blanking it addresses the next
// line's row, so the synchronous read has settled before that line's first
// pixel. Each stored pixel is shown H_ACTIVE/FB_W (= 2) times side by side
// to fill the wider picture. A set bit is white (0xFF on R, G and B), a clear
// bit black. hsync and vsync travel as the blue channel's control bits. Three
// tmds_encoder instances build the symbols and tmds_serializer shifts them out
// on the bit clock.
//
// Reading a whole line per access, the black-and-white picture and TMDS
// output follow the original design. Pixel doubling, the sync placement and the
// control-bit mapping are this design's choices.
//
// Timing: pixel pipeline of three pix_clk stages (counters, pixel select,
// encoder) before the serializer, which adds up to ten bit clocks.
// bit_clk must be 10 x pix_clk and phase-locked to it.
module hdmi_out #(
  parameter int FB_W     = 512,
  parameter int FB_H     = 576,
  parameter int H_ACTIVE = 1024,
  parameter int H_TOTAL  = 1120,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 32,
  parameter int V_ACTIVE = 576,
  parameter int V_TOTAL  = 600,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 5,
  localparam int AW = $clog2(FB_H),
  localparam int HW = $clog2(H_TOTAL),
  localparam int VW = $clog2(V_TOTAL)
) (
  input  logic            pix_clk,
  input  logic            pix_rst_n,
  input  logic            bit_clk,
  input  logic            bit_rst_n,
  output logic [AW-1:0]   fb_addr,
  input  logic [FB_W-1:0] fb_rdata,
  output logic [3:0]      tmds
);

  localparam int SCALE = H_ACTIVE / FB_W;

  logic [HW-1:0] hcount;
  logic [VW-1:0] vcount;
  logic de0, hs0, vs0;

  video_timing #(
    .H_ACTIVE(H_ACTIVE), .H_TOTAL(H_TOTAL), .H_FP(H_FP), .H_SYNC(H_SYNC),
    .V_ACTIVE(V_ACTIVE), .V_TOTAL(V_TOTAL), .V_FP(V_FP), .V_SYNC(V_SYNC)
  ) u_timing (
    .clk(pix_clk), .rst_n(pix_rst_n), .hcount(hcount), .vcount(vcount),
    .de(de0), .hsync(hs0), .vsync(vs0)
  );

  // Row to read: this line while it is shown, the next one during blanking.
  logic [VW-1:0] row;
  always_comb begin
    if (hcount < HW'(H_ACTIVE)) row = vcount;
    else if (vcount == VW'(V_TOTAL - 1)) row = '0;
    else row = vcount + 1'b1;
    fb_addr = (row < VW'(FB_H)) ? AW'(row) : '0;
  end

  // Stage 1: pick the pixel out of the row.
  logic [HW-1:0] col;
  logic pix1, de1, hs1, vs1;
  assign col = hcount / HW'(SCALE);

  always_ff @(posedge pix_clk or negedge pix_rst_n) begin
    if (!pix_rst_n) begin
      pix1 <= 1'b0;
      de1  <= 1'b0;
      hs1  <= 1'b0;
      vs1  <= 1'b0;
    end else begin
      pix1 <= de0 && (col < HW'(FB_W)) && fb_rdata[col[$clog2(FB_W)-1:0]];
      de1  <= de0;
      hs1  <= hs0;
      vs1  <= vs0;
    end
  end

  // Stage 2: TMDS encoding.
  logic [7:0] level;
  logic [9:0] sym_r, sym_g, sym_b;
  assign level = pix1 ? 8'hFF : 8'h00;

  tmds_encoder u_enc_b (.clk(pix_clk), .rst_n(pix_rst_n), .de(de1), .d(level), .c({vs1, hs1}), .q(sym_b));
  tmds_encoder u_enc_g (.clk(pix_clk), .rst_n(pix_rst_n), .de(de1), .d(level), .c(2'b00),      .q(sym_g));
  tmds_encoder u_enc_r (.clk(pix_clk), .rst_n(pix_rst_n), .de(de1), .d(level), .c(2'b00),      .q(sym_r));

  tmds_serializer u_ser (
    .bit_clk(bit_clk), .rst_n(bit_rst_n), .sym_r(sym_r), .sym_g(sym_g), .sym_b(sym_b), .tmds(tmds)
  );

endmodule
