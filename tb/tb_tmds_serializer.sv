// tb_tmds_serializer: feeds tmds_serializer a new random symbol triple every
// pixel clock (bit clock / 10) and recovers them from the serial lines with a
// receiver model framed by the clock line. Every symbol must come back, in
// order, once per ten bit clocks.
module tb_tmds_serializer;
  logic bit_clk = 0, pix_clk = 0, rst_n = 0;
  logic [9:0] sym_r = 0, sym_g = 0, sym_b = 0;
  logic [3:0] tmds;
  logic strobe;
  logic [9:0] rx_r, rx_g, rx_b;
  logic [29:0] sent [$];
  int checks = 0, failures = 0, div = 0, received = 0, last_strobe = -1, bits = 0;

  tmds_serializer dut (.bit_clk, .rst_n, .sym_r, .sym_g, .sym_b, .tmds);
  tmds_rx_model rx (.bit_clk, .tmds, .strobe, .sym_r(rx_r), .sym_g(rx_g), .sym_b(rx_b));

  always #5 bit_clk = ~bit_clk;
  // Pixel clock derived from the bit clock, as from one PLL.
  always @(posedge bit_clk) begin
    div <= (div == 9) ? 0 : div + 1;
    if (div == 0) pix_clk <= 1;
    if (div == 5) pix_clk <= 0;
  end
  always @(posedge pix_clk) if (rst_n) begin
    sym_r <= 10'($urandom); sym_g <= 10'($urandom); sym_b <= 10'($urandom);
  end
  always @(sym_r or sym_g or sym_b) if (rst_n) sent.push_back({sym_r, sym_g, sym_b});

  initial begin
    repeat (100000) @(posedge bit_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge bit_clk) begin
    bits++;
    if (strobe && rst_n) begin
      if (last_strobe >= 0) begin
        checks++;
        if (bits - last_strobe != 10) begin failures++; $display("FAIL strobe spacing %0d", bits - last_strobe); end
      end
      last_strobe = bits;
      // Drop symbols sent before the receiver locked.
      while (sent.size() > 0 && sent[0] != {rx_r, rx_g, rx_b} && received == 0) void'(sent.pop_front());
      checks++;
      if (sent.size() == 0 || sent[0] != {rx_r, rx_g, rx_b}) begin
        failures++; $display("FAIL received %h", {rx_r, rx_g, rx_b});
      end else void'(sent.pop_front());
      received++;
    end
  end

  initial begin
    repeat (23) @(negedge bit_clk);
    rst_n = 1;
    wait (received == 2000);
    checks++;
    if (sent.size() > 3) begin failures++; $display("FAIL %0d symbols not received", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
