// tmds_serializer: 10:1 parallel-to-serial converter for the four TMDS lines.
//
// Runs on the bit clock, ten times the pixel clock and phase-locked to it
// (40 MHz pixels, 400 Mbit/s per line). Every ten bit clocks it loads the
// three 10-bit channel symbols and shifts them out bit 0 first; the fourth
// line carries the pixel clock as the pattern 1111100000 (five ones, then five
// zeros), so a rising edge on it marks bit 0 of the symbols on the data lines.
// The symbol inputs must stay stable for a whole pixel period, which the
// registered encoder outputs do. Ten bits per pixel, sent bit 0 first, on three
// data lines plus a clock line follows the original design; single-data-rate
// shifting and the clock pattern are this design's choices.
// tmds[0] = blue (data 0), [1] = green (data 1), [2] = red (data 2), [3] = clock.
module tmds_serializer (
  input  logic       bit_clk,
  input  logic       rst_n,
  input  logic [9:0] sym_r,
  input  logic [9:0] sym_g,
  input  logic [9:0] sym_b,
  output logic [3:0] tmds
);

  localparam logic [9:0] CLK_PATTERN = 10'b0000011111;

  logic [3:0] cnt;
  logic [9:0] sh_r, sh_g, sh_b, sh_c;

  always_ff @(posedge bit_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      sh_r <= '0;
      sh_g <= '0;
      sh_b <= '0;
      sh_c <= '0;
    end else if (cnt == 4'd9) begin
      cnt  <= '0;
      sh_r <= sym_r;
      sh_g <= sym_g;
      sh_b <= sym_b;
      sh_c <= CLK_PATTERN;
    end else begin
      cnt  <= cnt + 1'b1;
      sh_r <= sh_r >> 1;
      sh_g <= sh_g >> 1;
      sh_b <= sh_b >> 1;
      sh_c <= sh_c >> 1;
    end
  end

  assign tmds = {sh_c[0], sh_r[0], sh_g[0], sh_b[0]};

endmodule
