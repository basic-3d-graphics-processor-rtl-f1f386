// tb_perspective_gen: random point pairs and angles through perspective_gen,
// compared with the reference projection (rotation about Y, x*256/(z+256),
// centre origin, Y up). Covers points behind the viewer and off-screen
// results, and checks the latency from start to out_valid.
module tb_perspective_gen;
  import gfx_pkg::*;
  import tb_ref_pkg::*;

  localparam int LAT = 4 * (24 + 3) + 5;   // start to out_valid, in cycles

  logic clk = 0, rst_n = 0, start = 0, busy, out_valid;
  point3_t p1, p2;
  logic [6:0] angle;
  point2_t q1, q2;
  int checks = 0, failures = 0;
  int behind = 0, offscreen = 0;

  perspective_gen dut (.clk, .rst_n, .start, .p1, .p2, .angle, .busy, .out_valid, .q1, .q2);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int x1, y1, z1, x2, y2, z2, a);
    int ex1, ey1, ex2, ey2, cyc;
    project(x1, y1, z1, a, 512, 576, 256, ex1, ey1);
    project(x2, y2, z2, a, 512, 576, 256, ex2, ey2);
    if (ex1 < 0 || ex1 >= 512 || ey1 < 0 || ey1 >= 576) offscreen++;
    if (z1 < -200 || z2 < -200) behind++;
    @(negedge clk);
    p1 = '{coord_t'(x1), coord_t'(y1), coord_t'(z1)};
    p2 = '{coord_t'(x2), coord_t'(y2), coord_t'(z2)};
    angle = 7'(a); start = 1;
    @(negedge clk); start = 0;
    p1 = '0; p2 = '0; angle = '0;                 // inputs must have been captured
    cyc = 0;
    while (!out_valid) begin @(negedge clk); cyc++; end
    checks += 2;
    if (int'(q1.x) != ex1 || int'(q1.y) != ey1 || int'(q2.x) != ex2 || int'(q2.y) != ey2) begin
      failures++;
      $display("FAIL a=%0d (%0d,%0d,%0d)->(%0d,%0d) exp (%0d,%0d); (%0d,%0d,%0d)->(%0d,%0d) exp (%0d,%0d)",
               a, x1, y1, z1, q1.x, q1.y, ex1, ey1, x2, y2, z2, q2.x, q2.y, ex2, ey2);
    end
    if (cyc != LAT) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, LAT); end
  endtask

  function automatic int rnd(input int lo, input int hi);
    return $urandom_range(0, hi - lo) + lo;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after reset"); end
    one(0, 0, 0, 100, 100, 0, 0);
    one(100, -50, 0, -100, 50, 100, 32);
    one(10, 10, -300, 10, 10, -256, 5);            // at and behind the viewer
    one(511, 511, -255, -512, -512, 511, 100);
    for (int i = 0; i < 200; i++)
      one(rnd(-512, 511), rnd(-512, 511), rnd(-512, 511), rnd(-512, 511), rnd(-512, 511), rnd(-512, 511), rnd(0, 127));
    checks++;
    if (behind == 0 || offscreen == 0) begin failures++; $display("FAIL: corner cases not reached"); end
    $display("behind=%0d offscreen=%0d", behind, offscreen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
