// tmds_encoder: TMDS 8b/10b encoder for one HDMI/DVI channel.
//
// During active video (de = 1) the byte d is first transition-minimised: each
// bit is XORed (or XNORed, when that gives fewer transitions) with the
// previous result bit, and bit 8 records which. The symbol is then sent either
// as is or with its low eight bits inverted (bit 9 = 1), whichever moves the
// running disparity (ones minus zeros sent so far) back toward zero. During
// blanking (de = 0) one of four fixed control symbols is sent for c[1:0] and
// the disparity restarts from zero. This is the standard DVI encoding: the
// original design only names TMDS and its 10-bit symbols.
// Timing: q is registered, one clk after de, d and c. Bit 0 of q is sent first.
module tmds_encoder (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       de,
  input  logic [7:0] d,
  input  logic [1:0] c,
  output logic [9:0] q
);

  logic [3:0] n1d, n1q;
  logic [8:0] qm;
  logic       use_xnor;
  logic signed [4:0] cnt, cnt_next;   // running disparity, ones minus zeros
  logic signed [4:0] bal;             // ones minus zeros of qm[7:0]
  logic [9:0] q_next;

  always_comb begin
    n1d = '0;
    for (int i = 0; i < 8; i++) n1d += 4'(d[i]);
    use_xnor = (n1d > 4'd4) || (n1d == 4'd4 && !d[0]);
    qm = {!use_xnor, 7'd0, d[0]};
    for (int i = 1; i < 8; i++)
      qm[i] = use_xnor ? ~(qm[i-1] ^ d[i]) : (qm[i-1] ^ d[i]);

    n1q = '0;
    for (int i = 0; i < 8; i++) n1q += 4'(qm[i]);
    bal = 5'(signed'({1'b0, n1q})) * 5'sd2 - 5'sd8;

    if (!de) begin
      unique case (c)
        2'b00: q_next = 10'b1101010100;
        2'b01: q_next = 10'b0010101011;
        2'b10: q_next = 10'b0101010100;
        default: q_next = 10'b1010101011;
      endcase
      cnt_next = '0;
    end else if (cnt == 0 || bal == 0) begin
      q_next = {~qm[8], qm[8], qm[8] ? qm[7:0] : ~qm[7:0]};
      cnt_next = qm[8] ? cnt + bal : cnt - bal;
    end else if ((cnt > 0 && bal > 0) || (cnt < 0 && bal < 0)) begin
      q_next = {1'b1, qm[8], ~qm[7:0]};
      cnt_next = cnt + (qm[8] ? 5'sd2 : 5'sd0) - bal;
    end else begin
      q_next = {1'b0, qm[8], qm[7:0]};
      cnt_next = cnt - (qm[8] ? 5'sd0 : 5'sd2) + bal;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q   <= 10'b1101010100;
      cnt <= '0;
    end else begin
      q   <= q_next;
      cnt <= cnt_next;
    end
  end

endmodule
