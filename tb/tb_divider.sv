// tb_divider: signed divisions with random and corner operands, compared with
// the language's truncating integer division; checks that done comes exactly
// NW+1 cycles after start and that busy covers the operation.
module tb_divider;
  localparam int NW = 24, DW = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic signed [NW-1:0] num = 0, quot;
  logic signed [DW-1:0] den = 1;
  int checks = 0, failures = 0;

  divider #(.NW(NW), .DW(DW)) dut (.clk, .rst_n, .start, .num, .den, .busy, .done, .quot);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint n, input longint d);
    int cyc;
    longint exp;
    @(negedge clk); num = NW'(n); den = DW'(d); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL: not busy after start"); end
    while (!done) begin @(negedge clk); cyc++; end
    exp = n / d;
    checks += 2;
    if (longint'(quot) != exp) begin failures++; $display("FAIL %0d / %0d = %0d, expected %0d", n, d, quot, exp); end
    if (cyc != NW + 1) begin failures++; $display("FAIL latency %0d, expected %0d", cyc, NW + 1); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    one(100, 7); one(-100, 7); one(100, -7); one(-100, -7);
    one(6, 3); one(0, 5); one(-8388608, 1); one(8388607, -1);
    one(131072, 256); one(-131071, 767); one(5, 32767); one(-5, -32768);
    for (int i = 0; i < 400; i++) begin
      longint n, d;
      n = longint'($urandom_range(0, 2 * 524288 - 1)) - 524288;   // |x*256| range of the design
      d = longint'($urandom_range(1, 1024));
      if ($urandom_range(0, 3) == 0) d = -d;
      one(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
