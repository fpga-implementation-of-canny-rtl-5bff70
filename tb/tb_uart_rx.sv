// tb_uart_rx: drives 8N1 frames onto the serial input at the configured bit
// period and checks each received byte; also sends a frame with a low stop
// bit (must raise rx_frame_err and give no byte) and a short glitch (must
// give nothing).
//
// The 8N1 format is this implementation's choice; the bit period is
// shortened here.
module tb_uart_rx;
  localparam int CPB = 8;
  logic clk = 0, rst = 1, rxd = 1;
  logic rx_valid, rx_frame_err;
  logic [7:0] rx_data;
  int checks = 0, failures = 0, n_valid = 0, n_err = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.clk, .rst, .rxd, .rx_valid, .rx_data, .rx_frame_err);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (rx_valid) begin n_valid++; last = rx_data; end
    if (rx_frame_err) n_err++;
  end

  task automatic send(logic [7:0] b, logic stop);
    rxd <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd <= b[i]; repeat (CPB) @(posedge clk); end
    rxd <= stop; repeat (CPB) @(posedge clk);
    rxd <= 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      logic [7:0] b;
      int nv;
      b = 8'($urandom);
      nv = n_valid;
      send(b, 1'b1);
      checks++;
      if (n_valid != nv + 1 || last != b) begin failures++; $display("sent %h got %h (%0d bytes)", b, last, n_valid - nv); end
    end
    begin
      int nv, ne;
      nv = n_valid; ne = n_err;
      send(8'hA5, 1'b0);
      checks++;
      if (n_valid != nv || n_err != ne + 1) begin failures++; $display("bad stop bit not flagged"); end
      nv = n_valid;
      rxd <= 0; repeat (2) @(posedge clk); rxd <= 1;
      repeat (12 * CPB) @(posedge clk);
      checks++;
      if (n_valid != nv) begin failures++; $display("glitch taken as a byte"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
