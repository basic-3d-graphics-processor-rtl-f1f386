// tmds_rx_model: behavioural TMDS receiver for testbenches. Samples the four
// serial lines on the falling bit-clock edge, shifts them in bit 0 first and,
// when the clock line has just shown a whole 1111100000 period, presents the
// three 10-bit data symbols with a one-bit-clock strobe.
module tmds_rx_model (
  input  logic       bit_clk,
  input  logic [3:0] tmds,
  output logic       strobe,
  output logic [9:0] sym_r,
  output logic [9:0] sym_g,
  output logic [9:0] sym_b
);
  logic [9:0] sh_r = '0, sh_g = '0, sh_b = '0, sh_c = '0;

  always @(negedge bit_clk) begin
    sh_b = {tmds[0], sh_b[9:1]};
    sh_g = {tmds[1], sh_g[9:1]};
    sh_r = {tmds[2], sh_r[9:1]};
    sh_c = {tmds[3], sh_c[9:1]};
    strobe <= (sh_c == 10'b0000011111);
    sym_r  <= sh_r;
    sym_g  <= sh_g;
    sym_b  <= sh_b;
  end
endmodule
