// tb_line_buffer_bank: checks that the bank delivers, for every window row r
// and column c of each frame, column c of rows r..r+K-1, in raster order.
// Two frames are sent: the first with random gaps in the input, the second
// back to back at one pixel per clock, where the bank must also deliver one
// column per clock within a row.
//
// The reduced K, W and H are this testbench's own.
module tb_line_buffer_bank;
  localparam int K = 3, W = 7, H = 6, DW = 8;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [DW-1:0] in_data = '0;
  logic col_valid, rd_en;
  logic [DW-1:0] col_data [K];
  logic [$clog2(W+1)-1:0] col_c;
  logic [$clog2(H+1)-1:0] col_r;
  logic [$clog2(K*W)-1:0] rd_addr [K];
  logic [$clog2(K*W)-1:0] wr_addr;
  int checks = 0, failures = 0;

  line_buffer_bank #(.DW(DW), .K(K), .W(W), .H(H)) dut (
    .clk, .rst, .in_valid, .in_data, .col_valid, .col_data, .col_c, .col_r,
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .wr_addr_o(wr_addr));

  always #5 clk = ~clk;

  function automatic int pix(int f, int i);
    return (f * 53 + i * 7 + 3) % 256;
  endfunction

  int exp_f[$], exp_r[$], exp_c[$];
  int last_cycle = -10, cycle = 0, back_to_back = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (col_valid && !rst) begin
    int f, r, c;
    if (exp_f.size() == 0) begin
      failures++; $display("unexpected column");
    end else begin
      f = exp_f.pop_front(); r = exp_r.pop_front(); c = exp_c.pop_front();
      checks++;
      if (col_c != c || col_r != r) begin
        failures++; $display("position %0d,%0d expected %0d,%0d", col_r, col_c, r, c);
      end
      for (int k = 0; k < K; k++) begin
        checks++;
        if (col_data[k] != DW'(pix(f, (r+k)*W + c))) begin
          failures++; $display("f%0d r%0d c%0d k%0d: %0d expected %0d", f, r, c, k, col_data[k], pix(f,(r+k)*W+c));
        end
      end
      if (f == 1 && c > 0) begin
        checks++;
        if (cycle - last_cycle != 1) begin failures++; $display("gap inside a row in the continuous frame"); end
        else back_to_back++;
      end
      last_cycle = cycle;
    end
  end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int r = 0; r <= H-K; r++)
        for (int c = 0; c < W; c++) begin exp_f.push_back(f); exp_r.push_back(r); exp_c.push_back(c); end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_data <= DW'(pix(f, i));
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_f.size() != 0) begin failures++; $display("%0d columns missing", exp_f.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
