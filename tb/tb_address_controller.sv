// tb_address_controller: drives write requests (rx_en pulses) and a model of
// the transmitter's ready signal into the controller, keeps a memory model
// written with wren/s_wraddr and read with rden/s_rdaddr, and checks: the
// state sequence (uartwrite exactly one clock after rden), FIFO order of the
// bytes handed to the transmitter, a request arriving during a read is kept,
// and a write into a full buffer raises overflow.
//
// The states and signal names are those of the serial link design; the
// stimulus and checks are this testbench's own.
module tb_address_controller;
  localparam int DEPTH = 8;
  logic clk = 0, rst = 1, rx_en = 0;
  logic tx_en;
  logic wren, rden, uartwrite, empty, full, overflow;
  logic [2:0] s_wraddr, s_rdaddr;
  int checks = 0, failures = 0;

  address_controller #(.DEPTH(DEPTH)) dut (.clk, .rst, .rx_en, .tx_en, .wren, .rden, .uartwrite,
    .s_wraddr, .s_rdaddr, .empty, .full, .overflow);
  always #5 clk = ~clk;

  int mem [DEPTH], hold, next_val = 0, sent [$], got [$], rd_word, prev_rden = 0;
  int tx_busy = 0, during_read = 0;

  always @(posedge clk) if (!rst) begin
    if (rx_en) hold = next_val - 1;
    if (wren) mem[s_wraddr] = hold;
    checks++;
    if (uartwrite != prev_rden) begin failures++; $display("uartwrite not one clock after rden"); end
    prev_rden = rden;
    if (rden) rd_word = mem[s_rdaddr];
    if (uartwrite) begin got.push_back(rd_word); tx_busy = 6; end
    else if (tx_busy > 0) tx_busy--;
    if (rx_en && (rden || uartwrite)) during_read++;
  end
  assign tx_en = (tx_busy == 0) && !rst;

  task automatic put();
    rx_en <= 1; next_val <= next_val + 1; sent.push_back(next_val);
    @(posedge clk);
    rx_en <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      if ($urandom_range(0, 2) == 0) put();
      else @(posedge clk);
      repeat ($urandom_range(3, 5)) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("sent %0d got %0d", sent.size(), got.size()); end
    foreach (got[i]) begin
      checks++;
      if (i < sent.size() && got[i] != sent[i]) begin failures++; $display("byte %0d: %0d expected %0d", i, got[i], sent[i]); end
    end
    checks++;
    if (during_read == 0) begin failures++; $display("no request arrived during a read"); end
    checks++;
    if (overflow) begin failures++; $display("overflow without reason"); end
    // Fill the buffer with the transmitter held busy: the ninth byte overflows.
    tx_busy = 1000;
    for (int i = 0; i < DEPTH + 1; i++) begin put(); repeat (3) @(posedge clk); end
    checks++;
    if (!overflow || !full) begin failures++; $display("full buffer not flagged"); end
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
