// gfx3d_top: 3D wireframe graphics accelerator with HDMI output.
//
// A host processor writes two 3D points and a rotation angle over an Avalon
// memory-mapped slave port and then a draw command. The perspective generator
// rotates both points about the Y axis and projects them onto the screen; the
// line generator draws the segment between them with Bresenham's algorithm
// into a 512 x 576 one-bit frame buffer; the HDMI output independently shows
// that buffer as a 1024 x 576, 60 Hz picture. A clear command zeroes the
// buffer. Reading offset 0 returns 1 once the last command has finished.
//
//   avalon_regs -> perspective_gen -> line_gen -> frame_buffer -> hdmi_out
//
// This pipeline, the register map and the sizes follow the original design. The
// processor, its bus fabric, the clock PLL and the differential pad drivers
// are outside: the slave port, three clocks and the serial lines are ports.
// tmds_n is the complement of tmds_p for pseudo-differential pads.
//
// Clocks: clk for the registers and drawing; pix_clk (40 MHz) and bit_clk
// (400 MHz, phase-locked to pix_clk) for video. Each has its own active-low
// reset. The only path between clk and the video clocks is the frame buffer.
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the assertion's disable condition, not logic.
module gfx3d_top
  import gfx_pkg::*;
#(
  parameter int FB_W        = 512,
  parameter int FB_H        = 576,
  parameter int PERSP_D     = 256,
  parameter int ANGLE_STEPS = 128,
  localparam int AW = $clog2(FB_H)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  avs_address,
  input  logic        avs_write,
  input  logic [31:0] avs_writedata,
  input  logic        avs_read,
  output logic [31:0] avs_readdata,
  input  logic        pix_clk,
  input  logic        pix_rst_n,
  input  logic        bit_clk,
  input  logic        bit_rst_n,
  output logic [3:0]  tmds_p,
  output logic [3:0]  tmds_n
);

  // The register interface and the trigonometry table are built for 128 steps.
  if (ANGLE_STEPS != (1 << ANGLE_W)) begin : g_bad_steps
    $error("ANGLE_STEPS must equal 2**ANGLE_W");
  end

  logic               cmd_draw, cmd_clear, op_done;
  point3_t            p1, p2;
  logic [ANGLE_W-1:0] angle;
  logic               persp_busy, persp_valid;
  point2_t            q1, q2;
  logic               line_busy;

  avalon_regs u_regs (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_write(avs_write), .avs_writedata(avs_writedata),
    .avs_read(avs_read), .avs_readdata(avs_readdata),
    .draw(cmd_draw), .clear(cmd_clear), .p1(p1), .p2(p2), .angle(angle),
    .op_done(op_done)
  );

  perspective_gen #(.D(PERSP_D), .FB_W(FB_W), .FB_H(FB_H)) u_persp (
    .clk(clk), .rst_n(rst_n), .start(cmd_draw), .p1(p1), .p2(p2), .angle(angle),
    .busy(persp_busy), .out_valid(persp_valid), .q1(q1), .q2(q2)
  );

  logic [AW-1:0]   fa_addr;
  logic            fa_we;
  logic [FB_W-1:0] fa_wdata, fa_rdata;

  line_gen #(.FB_W(FB_W), .FB_H(FB_H)) u_line (
    .clk(clk), .rst_n(rst_n), .draw(persp_valid), .clear(cmd_clear), .q1(q1), .q2(q2),
    .busy(line_busy), .done(op_done),
    .fb_addr(fa_addr), .fb_we(fa_we), .fb_wdata(fa_wdata), .fb_rdata(fa_rdata)
  );

  logic [AW-1:0]   fb_addr;
  logic [FB_W-1:0] fb_rdata;

  frame_buffer #(.W(FB_W), .DEPTH(FB_H)) u_fb (
    .clk_a(clk), .addr_a(fa_addr), .we_a(fa_we), .wdata_a(fa_wdata), .rdata_a(fa_rdata),
    .clk_b(pix_clk), .addr_b(fb_addr), .rdata_b(fb_rdata)
  );

  hdmi_out #(.FB_W(FB_W), .FB_H(FB_H), .V_ACTIVE(FB_H), .H_ACTIVE(2 * FB_W)) u_hdmi (
    .pix_clk(pix_clk), .pix_rst_n(pix_rst_n), .bit_clk(bit_clk), .bit_rst_n(bit_rst_n),
    .fb_addr(fb_addr), .fb_rdata(fb_rdata), .tmds(tmds_p)
  );

  assign tmds_n = ~tmds_p;

  // The two drawing stages never work at the same time: the line generator
  // starts when the perspective generator has finished, and the registers
  // accept no new command until the line generator is done.
  a_one_stage: assert property (@(posedge clk) disable iff (!rst_n) !(persp_busy && line_busy));

endmodule
