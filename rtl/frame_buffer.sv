// frame_buffer: one-bit-per-pixel frame buffer, a dual-port synchronous RAM of
// DEPTH rows by W bits (576 x 512 by default). Row y holds screen line y and
// bit x of a row is pixel x, so one read returns a whole line.
//
// Port A (clk_a) reads and writes and belongs to the line generator; port B
// (clk_b) only reads and belongs to the video output, which therefore runs
// independently of drawing (a frame may show a picture partly redrawn; there
// is no vertical-sync interlock). The organisation and the two ports follow
// the original design; separate clocks per port and old-data-on-write for port A
// are this design's choices. Both reads have one cycle of latency. The
// contents are not reset: the line generator's clear command zeroes them.
module frame_buffer #(
  parameter int W     = 512,
  parameter int DEPTH = 576,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk_a,
  input  logic [AW-1:0] addr_a,
  input  logic          we_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  input  logic          clk_b,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  rdata_b
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk_a) begin
    if (we_a) mem[addr_a] <= wdata_a;
    rdata_a <= mem[addr_a];
  end

  always_ff @(posedge clk_b) begin
    rdata_b <= mem[addr_b];
  end

endmodule
