// avalon_regs: Avalon-MM slave register file of the graphics accelerator.
//
// Word offsets (write): 0 = draw (write 1), 1 = first point, 2 = second point,
// 3 = rotation angle about Y (0..127 = 0..360 degrees), 4 = clear (write 1).
// Offset 0 read returns, in bit 0, 1 when no operation is running and 0 while
// a draw or clear is in progress. A point word holds X in [29:20], Y in
// [19:10] and Z in [9:0], all signed; [31:30] are ignored.
//
// The register map follows the original design. Bus timing is this design's:
// no waitrequest, fixed read latency of one cycle. A command is accepted only
// while the accelerator is idle and leaves as a one-cycle pulse on draw or
// clear; from the next cycle on the status bit reads 0 until op_done pulses.
// Commands written while busy are dropped: software polls offset 0 first.
// Lint reports rst_n as used both asynchronously and synchronously: the
// synchronous use is only the assertion's disable condition, not logic.
module avalon_regs
  import gfx_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          avs_address,
  input  logic                avs_write,
  input  logic [31:0]         avs_writedata,
  input  logic                avs_read,
  output logic [31:0]         avs_readdata,
  output logic                draw,
  output logic                clear,
  output point3_t             p1,
  output point3_t             p2,
  output logic [ANGLE_W-1:0]  angle,
  input  logic                op_done
);

  logic busy;
  logic wr_draw, wr_clear;

  assign wr_draw  = avs_write && avs_address == REG_DRAW  && avs_writedata[0] && !busy;
  assign wr_clear = avs_write && avs_address == REG_CLEAR && avs_writedata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1    <= '0;
      p2    <= '0;
      angle <= '0;
      draw  <= 1'b0;
      clear <= 1'b0;
      busy  <= 1'b0;
      avs_readdata <= '0;
    end else begin
      draw  <= wr_draw;
      clear <= wr_clear;
      if (wr_draw || wr_clear) busy <= 1'b1;
      else if (op_done)        busy <= 1'b0;
      if (avs_write) begin
        unique case (avs_address)
          REG_POINT1: p1    <= unpack_point(avs_writedata[29:0]);
          REG_POINT2: p2    <= unpack_point(avs_writedata[29:0]);
          REG_ANGLE:  angle <= avs_writedata[ANGLE_W-1:0];
          default: ;
        endcase
      end
      if (avs_read)
        avs_readdata <= (avs_address == REG_DRAW) ? {31'd0, !busy} : 32'd0;
    end
  end

  // A command pulse is only issued when no earlier operation is running.
  a_cmd_when_idle: assert property (@(posedge clk) disable iff (!rst_n) (draw || clear) |-> $past(!busy));

endmodule
