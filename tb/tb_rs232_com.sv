// tb_rs232_com: exercises the serial link module end to end with a serial
// driver and a serial decoder in the testbench.
//   loopback = 1: bytes sent to rxd must come back on txd in order.
//   loopback = 0: bytes sent to rxd must appear on rx_valid/rx_data, and
//                 bytes offered on px_valid/px_data (a burst faster than the
//                 line) must be buffered and sent on txd in order.
//
// The loopback test is the design's own link test; the bit period is
// shortened here.
module tb_rs232_com;
  localparam int CPB = 8, DEPTH = 16;
  logic clk = 0, rst = 1, loopback = 1, rxd = 1, px_valid = 0;
  logic [7:0] px_data = '0, rx_data;
  logic txd, rx_valid, overflow;
  int checks = 0, failures = 0;

  rs232_com #(.CLKS_PER_BIT(CPB), .FIFO_DEPTH(DEPTH)) dut (.clk, .rst, .loopback, .rxd, .txd,
    .rx_valid, .rx_data, .px_valid, .px_data, .overflow);
  always #5 clk = ~clk;

  int line_bytes [$], rx_bytes [$];

  // Serial decoder on txd.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge txd);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      if (txd) line_bytes.push_back(b);
      else begin failures++; $display("missing stop bit on txd"); end
    end
  end

  always @(posedge clk) if (!rst && rx_valid) rx_bytes.push_back(rx_data);

  task automatic send(logic [7:0] b);
    rxd <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (CPB) @(posedge clk); end
    rxd <= 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    int exp_b [$];
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    // Loopback: echo.
    for (int t = 0; t < 12; t++) begin
      logic [7:0] b;
      b = 8'($urandom); exp_b.push_back(b); send(b);
    end
    repeat (12 * CPB * 2) @(posedge clk);
    checks++;
    if (line_bytes.size() != exp_b.size()) begin failures++; $display("echoed %0d of %0d", line_bytes.size(), exp_b.size()); end
    foreach (line_bytes[i]) begin
      checks++;
      if (i < exp_b.size() && line_bytes[i] != exp_b[i]) begin failures++; $display("echo %0d: %h expected %h", i, line_bytes[i], exp_b[i]); end
    end
    checks++;
    if (rx_bytes.size() != 0) begin failures++; $display("bytes passed on in loopback"); end
    // Normal mode.
    loopback <= 0;
    line_bytes.delete(); exp_b.delete();
    @(posedge clk);
    for (int t = 0; t < 10; t++) begin
      px_valid <= 1; px_data <= 8'(t * 17 + 3); exp_b.push_back(t * 17 + 3);
      @(posedge clk);
      px_valid <= 0;
      repeat (3) @(posedge clk);
    end
    for (int t = 0; t < 5; t++) begin
      send(8'(t + 100));
      checks++;
      repeat (3) @(posedge clk);
      if (rx_bytes.size() != t + 1 || rx_bytes[t] != t + 100) begin failures++; $display("received byte %0d wrong", t); end
    end
    repeat (12 * CPB * 12) @(posedge clk);
    checks++;
    if (line_bytes.size() != exp_b.size()) begin failures++; $display("sent %0d of %0d", line_bytes.size(), exp_b.size()); end
    foreach (line_bytes[i]) begin
      checks++;
      if (i < exp_b.size() && line_bytes[i] != exp_b[i]) begin failures++; $display("tx %0d: %h expected %h", i, line_bytes[i], exp_b[i]); end
    end
    checks++;
    if (overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
