// tb_video_timing: runs video_timing at its default 1120 x 600 raster for
// two frames and measures, from the outputs alone, the frame length, the
// number of active pixels per line and lines per frame, and the sync pulse
// widths and positions.
module tb_video_timing;
  logic clk = 0, rst_n = 0;
  logic [10:0] hcount;
  logic [9:0] vcount;
  logic de, hsync, vsync;
  int checks = 0, failures = 0;

  video_timing dut (.clk, .rst_n, .hcount, .vcount, .de, .hsync, .vsync);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, vs_start, vs_start2, de_pix, de_lines, hs_len, hs_pos, vs_len_px;
    bit line_has_de, prev_vs, prev_hs;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Find the start of a vsync pulse.
    t = 0; prev_vs = 0;
    forever begin @(negedge clk); t++; if (vsync && !prev_vs) break; prev_vs = vsync; end
    vs_start = t;
    de_pix = 0; de_lines = 0; hs_len = 0; vs_len_px = 0; hs_pos = -1;
    prev_vs = 1; prev_hs = hsync;
    forever begin
      @(negedge clk); t++;
      if (de) de_pix++;
      if (vsync) vs_len_px++;
      if (hsync) hs_len++;
      if (de && hcount == 0) de_lines++;
      if (hsync && !prev_hs && hs_pos < 0 && vcount == 0) hs_pos = hcount;
      if (vsync && !prev_vs) break;
      prev_vs = vsync; prev_hs = hsync;
    end
    vs_start2 = t;
    check(vs_start2 - vs_start == 1120 * 600, $sformatf("frame period %0d", vs_start2 - vs_start));
    check(de_pix == 1024 * 576, $sformatf("active pixels %0d", de_pix));
    check(de_lines == 576, $sformatf("active lines %0d", de_lines));
    check(hs_len == 32 * 600, $sformatf("hsync pixels %0d", hs_len));
    check(vs_len_px == 5 * 1120, $sformatf("vsync length %0d", vs_len_px));
    check(hs_pos == 1024 + 16, $sformatf("hsync start %0d", hs_pos));
    check(vcount == 576 + 3, $sformatf("vsync start line %0d", vcount));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
