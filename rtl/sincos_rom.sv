// sincos_rom: sine and cosine of the rotation angle, one registered lookup
// per cycle.
//
// The angle is an index k in 0..ANGLE_STEPS-1 standing for 2*pi*k/ANGLE_STEPS
// (128 steps of about 2.8 degrees). Each entry is round(2^FRAC * sin(angle)),
// signed, so +-1.0 reads as +-256 with the default FRAC = 8. Holding the
// values in a precomputed table follows the original design; computing the table
// at elaboration time with an integer Taylor series (so no data file is
// needed), and the fixed-point format, are this design's choices.
// Timing: sin_q and cos_q are valid one clk cycle after angle.
module sincos_rom #(
  parameter int ANGLE_STEPS = 128,
  parameter int FRAC        = 8,
  parameter int W           = 10
) (
  input  logic                          clk,
  input  logic [$clog2(ANGLE_STEPS)-1:0] angle,
  output logic signed [W-1:0]           sin_q,
  output logic signed [W-1:0]           cos_q
);

  // Q30 constants.
  localparam longint ONE = 64'd1 << 30;
  localparam longint PI  = 64'd3373259426;   // pi * 2^30

  // sin(x) for 0 <= x <= pi/2, x and result in Q30, Taylor series to x^11.
  function automatic longint sin_q30(input longint x);
    longint term, sum;
    longint x2;
    x2   = (x * x) >>> 30;
    term = x;
    sum  = x;
    for (int n = 1; n <= 5; n++) begin
      term = -((term * x2) >>> 30) / ((2 * n) * (2 * n + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // round(2^FRAC * sin(2*pi*k/ANGLE_STEPS)), folding k into the first quadrant.
  function automatic int sin_entry(input int k);
    int     q, r, m;
    longint x, s;
    int     v;
    q = (4 * k) / ANGLE_STEPS;                 // quadrant 0..3
    r = 4 * k - q * ANGLE_STEPS;               // 4*k mod ANGLE_STEPS
    m = (q % 2 == 0) ? r : ANGLE_STEPS - r;    // mirrored position in quadrant
    x = (PI * m) / (2 * ANGLE_STEPS);          // (pi/2) * m / ANGLE_STEPS
    s = sin_q30(x);
    v = int'(((s << FRAC) + (ONE >>> 1)) >>> 30);
    return (q >= 2) ? -v : v;
  endfunction

  logic signed [W-1:0] sin_tab [ANGLE_STEPS];

  for (genvar k = 0; k < ANGLE_STEPS; k++) begin : g_tab
    localparam int S = sin_entry(k);
    assign sin_tab[k] = W'(S);
  end

  // cos(a) = sin(a + quarter turn)
  localparam int QUARTER = ANGLE_STEPS / 4;
  logic [$clog2(ANGLE_STEPS)-1:0] cos_idx;
  assign cos_idx = angle + ($clog2(ANGLE_STEPS))'(QUARTER);

  always_ff @(posedge clk) begin
    sin_q <= sin_tab[angle];
    cos_q <= sin_tab[cos_idx];
  end

endmodule
