// tb_rotator_y: random points and angles through rotator_y, compared with
// floor((x*cos + z*sin)/256) and floor((z*cos - x*sin)/256) computed in
// 64-bit integers; y must pass unchanged. Checks the one-cycle latency.
module tb_rotator_y;
  import gfx_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0;
  point3_t p;
  logic signed [9:0] s, c;
  rpoint_t r;
  int checks = 0, failures = 0;

  rotator_y dut (.clk, .p, .sin_q(s), .cos_q(c), .r);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, z, a, ex, ez;
    for (int i = 0; i < 2000; i++) begin
      x = $urandom_range(0, 1023) - 512;
      y = $urandom_range(0, 1023) - 512;
      z = $urandom_range(0, 1023) - 512;
      a = (i < 8) ? i * 16 : $urandom_range(0, 127);
      if (i == 8) begin x = -512; z = -512; a = 16; end   // largest result
      @(negedge clk);
      p.x = coord_t'(x); p.y = coord_t'(y); p.z = coord_t'(z);
      s = 10'(sin_ref(a)); c = 10'(cos_ref(a));
      ex = floor_div(longint'(x) * cos_ref(a) + longint'(z) * sin_ref(a), 256);
      ez = floor_div(longint'(z) * cos_ref(a) - longint'(x) * sin_ref(a), 256);
      @(posedge clk); #1;
      checks++;
      if (int'(r.x) != ex || int'(r.y) != y || int'(r.z) != ez) begin
        failures++;
        $display("FAIL (%0d,%0d,%0d) a=%0d -> (%0d,%0d,%0d), expected (%0d,%0d,%0d)", x, y, z, a, r.x, r.y, r.z, ex, y, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
