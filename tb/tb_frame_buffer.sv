// tb_frame_buffer: writes random rows through port A, reads them back on both
// ports with one cycle of latency, checks that a read during a write on port
// A returns the old row, and runs the two ports on unrelated clocks.
module tb_frame_buffer;
  localparam int W = 512, DEPTH = 576;
  logic clk_a = 0, clk_b = 0, we_a = 0;
  logic [9:0] addr_a = 0, addr_b = 0;
  logic [W-1:0] wdata_a = 0, rdata_a, rdata_b;
  logic [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  frame_buffer dut (.clk_a, .addr_a, .we_a, .wdata_a, .rdata_a, .clk_b, .addr_b, .rdata_b);

  always #5 clk_a = ~clk_a;
  always #7 clk_b = ~clk_b;

  function automatic logic [W-1:0] rnd_row();
    logic [W-1:0] r;
    for (int i = 0; i < W / 32; i++) r[i*32 +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk_a);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = rnd_row();
      @(negedge clk_a); addr_a = 10'(a); wdata_a = model[a]; we_a = 1;
    end
    @(negedge clk_a); we_a = 0;
    // Port A read-back, one-cycle latency.
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(0, DEPTH - 1);
      @(negedge clk_a); addr_a = 10'(a);
      @(posedge clk_a); #1;
      checks++;
      if (rdata_a != model[a]) begin failures++; $display("FAIL port A row %0d", a); end
    end
    // Read during write returns old data, then new data.
    @(negedge clk_a); addr_a = 10'd17; wdata_a = ~model[17]; we_a = 1;
    @(posedge clk_a); #1;
    checks++;
    if (rdata_a != model[17]) begin failures++; $display("FAIL read-during-write"); end
    model[17] = ~model[17];
    @(negedge clk_a); we_a = 0;
    @(posedge clk_a); #1;
    checks++;
    if (rdata_a != model[17]) begin failures++; $display("FAIL new data after write"); end
    // Port B on its own clock.
    for (int i = 0; i < 300; i++) begin
      automatic int a = (i < 2) ? 575 * i : $urandom_range(0, DEPTH - 1);
      if (i == 2) a = 17;
      @(negedge clk_b); addr_b = 10'(a);
      @(posedge clk_b); #1;
      checks++;
      if (rdata_b != model[a]) begin failures++; $display("FAIL port B row %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
