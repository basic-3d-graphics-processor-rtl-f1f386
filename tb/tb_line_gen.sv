// tb_line_gen: line_gen on a 64 x 48 buffer held in a testbench memory with
// one-cycle read latency. Random lines (including ones running off screen)
// are drawn on top of each other and the whole buffer is compared with a
// software Bresenham after each line; done must come 3n+1 cycles after the
// cycle draw is taken, for a line of n pixels all on screen. Clear must zero
// every row, with done FB_H cycles after it is taken.
module tb_line_gen;
  import gfx_pkg::*;
  import tb_ref_pkg::*;

  localparam int FB_W = 64, FB_H = 48, AW = $clog2(FB_H);

  logic clk = 0, rst_n = 0, draw = 0, clear = 0, busy, done;
  point2_t q1, q2;
  logic [AW-1:0] fb_addr;
  logic fb_we;
  logic [FB_W-1:0] fb_wdata, fb_rdata;
  logic [FB_W-1:0] mem [FB_H];
  bit img [][];
  int checks = 0, failures = 0;
  int clipped_lines = 0, overlaps = 0, clears = 0;

  line_gen #(.FB_W(FB_W), .FB_H(FB_H)) dut (.clk, .rst_n, .draw, .clear, .q1, .q2, .busy, .done,
    .fb_addr, .fb_we, .fb_wdata, .fb_rdata);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (fb_we) mem[fb_addr] <= fb_wdata;
    fb_rdata <= mem[fb_addr];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    int bad = 0;
    for (int y = 0; y < FB_H; y++)
      for (int x = 0; x < FB_W; x++)
        if (mem[y][x] != img[y][x]) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d pixels differ", what, bad); end
  endtask

  task automatic do_clear();
    int cyc = 0;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (!done) begin @(negedge clk); cyc++; end
    clears++;
    foreach (img[y, x]) img[y][x] = 0;
    checks++;
    if (cyc != FB_H) begin failures++; $display("FAIL clear took %0d cycles", cyc); end
    compare("clear");
  endtask

  task automatic line(input int x0, y0, x1, y1);
    int n, off, cyc = 0, nb = 0, na = 0;
    foreach (img[y, x]) nb += img[y][x];
    draw_line(img, x0, y0, x1, y1, n, off);
    foreach (img[y, x]) na += img[y][x];
    if (na - nb < n - off) overlaps++;
    if (off > 0) clipped_lines++;
    @(negedge clk);
    q1 = '{rcoord_t'(x0), rcoord_t'(y0)}; q2 = '{rcoord_t'(x1), rcoord_t'(y1)}; draw = 1;
    @(negedge clk); draw = 0;
    q1 = '0; q2 = '0;
    while (!done) begin @(negedge clk); cyc++; end
    compare($sformatf("line (%0d,%0d)-(%0d,%0d)", x0, y0, x1, y1));
    if (off == 0) begin
      checks++;
      if (cyc != 3 * n + 1) begin failures++; $display("FAIL line of %0d pixels took %0d cycles", n, cyc); end
    end
  endtask

  initial begin
    img = new[FB_H];
    foreach (img[y]) img[y] = new[FB_W];
    repeat (3) @(negedge clk);
    rst_n = 1;
    do_clear();
    line(0, 0, 63, 47);  line(63, 0, 0, 47);  line(10, 5, 10, 40); line(2, 20, 60, 20);
    line(5, 5, 5, 5);    line(30, 10, 33, 30); line(50, 45, 12, 3);
    line(-20, -10, 80, 60); line(40, -5, 70, 10);   // partly off screen
    for (int i = 0; i < 60; i++)
      line($urandom_range(0, 90) - 15, $urandom_range(0, 70) - 12, $urandom_range(0, 90) - 15, $urandom_range(0, 70) - 12);
    // draw and clear together: clear wins
    @(negedge clk); draw = 1; clear = 1; q1 = '{12'sd1, 12'sd1}; q2 = '{12'sd9, 12'sd9};
    @(negedge clk); draw = 0; clear = 0;
    while (!done) @(negedge clk);
    foreach (img[y, x]) img[y][x] = 0;
    compare("clear priority");
    do_clear();
    checks++;
    if (clipped_lines == 0 || overlaps == 0 || clears == 0) begin failures++; $display("FAIL: clip/overlap/clear not exercised"); end
    $display("clipped=%0d overlapping=%0d clears=%0d", clipped_lines, overlaps, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
