// divider: sequential signed integer divider, quotient truncated toward zero.
//
// It performs the perspective divisions of the accelerator. A pulse on start
// captures num and den; the magnitudes are divided by restoring division, one
// quotient bit per clock, and the sign is applied at the end. done pulses for
// one cycle NW+1 cycles after start, with quot valid from then until the next
// start. A zero denominator gives an all-ones magnitude. Truncation toward
// zero matches the vendor divider of the original design; using one
// shared multi-cycle divider instead of that vendor block is this design's
// choice.
module divider #(
  parameter int NW = 24,
  parameter int DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic signed [DW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [NW-1:0] quot
);

  logic [NW-1:0]      n_mag;   // dividend magnitude, shifted out MSB first
  logic [DW-1:0]      d_mag;
  logic [DW-1:0]      rem;     // partial remainder
  logic [NW-1:0]      q;
  logic               neg;
  logic [$clog2(NW+1)-1:0] cnt;
  logic               fin;     // last step done, sign still to apply

  logic [DW:0] trial;
  assign trial = {rem, n_mag[NW-1]} - {1'b0, d_mag};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      fin   <= 1'b0;
      quot  <= '0;
      n_mag <= '0;
      d_mag <= '0;
      rem   <= '0;
      q     <= '0;
      neg   <= 1'b0;
      cnt   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        n_mag <= num[NW-1] ? NW'(-num) : NW'(num);
        d_mag <= den[DW-1] ? DW'(-den) : DW'(den);
        neg   <= num[NW-1] ^ den[DW-1];
        rem   <= '0;
        q     <= '0;
        cnt   <= ($clog2(NW+1))'(NW);
      end else if (fin) begin
        fin  <= 1'b0;
        busy <= 1'b0;
        done <= 1'b1;
        quot <= neg ? -q : q;
      end else if (busy) begin
        if (!trial[DW]) begin
          rem <= trial[DW-1:0];
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= {rem[DW-2:0], n_mag[NW-1]};
          q   <= {q[NW-2:0], 1'b0};
        end
        n_mag <= {n_mag[NW-2:0], 1'b0};
        cnt   <= cnt - 1'b1;
        if (cnt == 1) fin <= 1'b1;
      end
    end
  end

endmodule
