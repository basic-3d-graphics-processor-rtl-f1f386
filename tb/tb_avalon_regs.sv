// tb_avalon_regs: checks the register map of avalon_regs: point unpacking,
// angle, draw/clear command pulses, the finished flag and that commands
// written while busy are dropped.
module tb_avalon_regs;
  import gfx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] address = 0;
  logic write = 0, read = 0, op_done = 0;
  logic [31:0] writedata = 0, readdata;
  logic draw, clear;
  point3_t p1, p2;
  logic [6:0] angle;
  int checks = 0, failures = 0;
  int draws = 0, clears = 0;

  avalon_regs dut (.clk, .rst_n, .avs_address(address), .avs_write(write), .avs_writedata(writedata),
                   .avs_read(read), .avs_readdata(readdata), .draw, .clear, .p1, .p2, .angle, .op_done);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && draw) draws++;
    if (rst_n && clear) clears++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input logic [31:0] v);
    @(negedge clk); address = 3'(a); writedata = v; write = 1;
    @(negedge clk); write = 0;
  endtask

  task automatic rd(input int a, output logic [31:0] v);
    @(negedge clk); address = 3'(a); read = 1;
    @(negedge clk); read = 0; v = readdata;
  endtask

  task automatic finish_op();
    @(negedge clk); op_done = 1; @(negedge clk); op_done = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    int x, y, z, a_r;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(0, v); check(v == 32'd1, "idle status reads 1");
    for (int i = 0; i < 50; i++) begin
      a_r = $urandom_range(0, 127); x = $urandom_range(0, 1023) - 512; y = $urandom_range(0, 1023) - 512; z = $urandom_range(0, 1023) - 512;
      wr(1, {2'($urandom), 10'(x), 10'(y), 10'(z)});
      check(p1.x == coord_t'(x) && p1.y == coord_t'(y) && p1.z == coord_t'(z), "point 1 unpack");
      wr(2, {2'b11, 10'(z), 10'(x), 10'(y)});
      check(p2.x == coord_t'(z) && p2.y == coord_t'(x) && p2.z == coord_t'(y), "point 2 unpack");
      wr(3, 32'(a_r)); check(angle == 7'(a_r), "angle write");
    end
    wr(3, 32'd77); check(angle == 7'd77, "angle");
    check(draws == 0 && clears == 0, "no command from data writes");
    wr(0, 32'd0); check(draws == 0, "writing 0 does not draw");
    wr(0, 32'd1); @(negedge clk); check(draws == 1, "draw pulse");
    rd(0, v); check(v == 32'd0, "busy after draw");
    wr(4, 32'd1); check(clears == 0, "clear dropped while busy");
    wr(0, 32'd1); check(draws == 1, "draw dropped while busy");
    finish_op();
    rd(0, v); check(v == 32'd1, "finished after op_done");
    wr(4, 32'd1); @(negedge clk); check(clears == 1, "clear pulse");
    rd(0, v); check(v == 32'd0, "busy after clear");
    rd(2, v); check(v == 32'd0, "other offsets read 0");
    finish_op();
    rd(0, v); check(v == 32'd1, "finished after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
