// tb_uart_tx: sends random bytes and decodes the serial line in the
// testbench: start bit low, eight data bits LSB first, stop bit high, each
// exactly CLKS_PER_BIT clocks, tx_ready low for the whole frame.
//
// The 8N1 format is this implementation's choice; the bit period is
// shortened here.
module tb_uart_tx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, tx_start = 0;
  logic [7:0] tx_data = '0;
  logic tx_ready, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .tx_start, .tx_data, .tx_ready, .txd);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++;
    if (!tx_ready || !txd) begin failures++; $display("not idle after reset"); end
    for (int t = 0; t < 40; t++) begin
      logic [7:0] b, got;
      b = 8'($urandom);
      if (t == 0) b = 8'h00;
      if (t == 1) b = 8'hFF;
      tx_start <= 1; tx_data <= b;
      @(posedge clk);
      tx_start <= 0;
      // Sample each bit in the middle of its period.
      repeat (CPB / 2) @(posedge clk);
      checks++;
      if (txd !== 1'b0 || tx_ready) begin failures++; $display("no start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(posedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(posedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("no stop bit"); end
      checks++;
      if (got != b) begin failures++; $display("sent %h got %h", b, got); end
      repeat (CPB / 2 + 1) @(posedge clk);
      checks++;
      if (!tx_ready) begin failures++; $display("not ready after the stop bit"); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
