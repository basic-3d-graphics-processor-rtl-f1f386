// tb_tmds_encoder: random bytes (and runs of 0x00 and 0xFF, the values the
// video output sends) through tmds_encoder. Every data symbol must decode
// back to its byte, the running disparity of the symbols sent must stay
// within +-10 and never drift, and blanking must give the four DVI control
// symbols and restart the disparity. Checks the one-cycle latency.
module tb_tmds_encoder;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, de = 0;
  logic [7:0] d = 0;
  logic [1:0] c = 0;
  logic [9:0] q;
  int checks = 0, failures = 0;
  int disp = 0, max_disp = 0;

  tmds_encoder dut (.clk, .rst_n, .de, .d, .c, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(input logic [9:0] v);
    int n = 0;
    for (int i = 0; i < 10; i++) n += int'(v[i]);
    return n;
  endfunction

  task automatic send_data(input logic [7:0] v);
    @(negedge clk); de = 1; d = v;
    @(posedge clk); #1;
    checks++;
    if (tmds_decode(q) !== v || tmds_ctrl(q) != -1) begin failures++; $display("FAIL data %02h -> %b", v, q); end
    disp += 2 * ones(q) - 10;
    if (disp > max_disp) max_disp = disp;
    if (-disp > max_disp) max_disp = -disp;
    checks++;
    if (disp > 10 || disp < -10) begin failures++; $display("FAIL disparity %0d", disp); end
  endtask

  task automatic send_ctrl(input logic [1:0] cv);
    @(negedge clk); de = 0; c = cv; d = 8'($urandom);
    @(posedge clk); #1;
    checks++;
    if (tmds_ctrl(q) != int'(cv)) begin failures++; $display("FAIL control %0d -> %b", cv, q); end
    disp = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) send_ctrl(2'(k));
    for (int i = 0; i < 256; i++) send_data(8'(i));
    send_ctrl(2'd1);
    for (int i = 0; i < 2000; i++) send_data(8'($urandom));
    send_ctrl(2'd3);
    for (int r = 0; r < 200; r++) begin
      automatic logic [7:0] v = ($urandom_range(0, 1) != 0) ? 8'hFF : 8'h00;
      for (int i = $urandom_range(1, 9); i > 0; i--) send_data(v);
    end
    send_ctrl(2'd2);
    $display("max |disparity| = %0d", max_disp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
