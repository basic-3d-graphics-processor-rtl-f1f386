// tb_sincos_rom: compares every entry of sincos_rom with round(256*sin) and
// round(256*cos) computed with real arithmetic, and checks the one-cycle
// read latency.
module tb_sincos_rom;
  import tb_ref_pkg::*;

  logic clk = 0;
  logic [6:0] angle = 0;
  logic signed [9:0] sin_q, cos_q;
  int checks = 0, failures = 0;

  sincos_rom dut (.clk, .angle, .sin_q, .cos_q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 128; k++) begin
      @(negedge clk); angle = 7'(k);
      @(posedge clk); #1;
      checks += 2;
      if (int'(sin_q) != sin_ref(k)) begin failures++; $display("FAIL sin[%0d] = %0d, expected %0d", k, sin_q, sin_ref(k)); end
      if (int'(cos_q) != cos_ref(k)) begin failures++; $display("FAIL cos[%0d] = %0d, expected %0d", k, cos_q, cos_ref(k)); end
    end
    // Latency: output must not follow the address before the clock edge.
    @(negedge clk); angle = 7'd32;
    @(posedge clk); #1;
    @(negedge clk); angle = 7'd0; #1;
    checks++;
    if (sin_q != 10'sd256) begin failures++; $display("FAIL: output changed before clock edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
