// video_timing: raster counters for the HDMI output.
//
// hcount runs 0..H_TOTAL-1 and vcount 0..V_TOTAL-1, one pixel per clk. The
// active picture is the top-left H_ACTIVE x V_ACTIVE corner (de = 1); the rest
// is blanking, inside which hsync and vsync are high for H_SYNC pixels and
// V_SYNC lines after a front porch of H_FP pixels and V_FP lines. The totals
// (1120 x 600 around a 1024 x 576 picture, 59.5 frames/s at 40 MHz) follow the
// original design; porch and sync widths and positive sync polarity are this
// design's choices. All outputs are decoded from the counter registers, so
// they change one clk after the counters step.
module video_timing #(
  parameter int H_ACTIVE = 1024,
  parameter int H_TOTAL  = 1120,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 32,
  parameter int V_ACTIVE = 576,
  parameter int V_TOTAL  = 600,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 5,
  localparam int HW = $clog2(H_TOTAL),
  localparam int VW = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          de,
  output logic          hsync,
  output logic          vsync
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (hcount == HW'(H_TOTAL - 1)) begin
      hcount <= '0;
      vcount <= (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
    end else begin
      hcount <= hcount + 1'b1;
    end
  end

  assign de    = (hcount < HW'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));
  assign hsync = (hcount >= HW'(H_ACTIVE + H_FP)) && (hcount < HW'(H_ACTIVE + H_FP + H_SYNC));
  assign vsync = (vcount >= VW'(V_ACTIVE + V_FP)) && (vcount < VW'(V_ACTIVE + V_FP + V_SYNC));

endmodule
