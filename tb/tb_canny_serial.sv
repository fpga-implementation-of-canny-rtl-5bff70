// tb_canny_serial: the 708 x 752 test frame sent to the edge detector through
// the serial link, and the edge map read back from the serial line, as a host
// computer would use the board. The frame size, the FIFO depth and every other
// parameter are the defaults; only the bit period is shortened, from 868 to 32
// clocks per bit, so that the 5.3 million bit periods of the frame simulate in
// minutes rather than hours.
//
// The bit period cannot be shortened further. Between two bytes the address
// controller spends 3 clocks (IDLE, RD_MEM, UART_WRITE) before the
// transmitter is loaded again, so a byte leaves every 10*CPB+3 clocks while
// pixels arrive every 10*CPB clocks. The link still keeps up because each row
// of 708 pixels gives only 698 edge bytes: the buffer drains at the end of
// every row as long as 698*3 < 10*10*CPB, that is CPB >= 21. At 4 clocks per
// bit the buffer overflows within the frame; at 868 the margin is large.
//
// A serial driver sends every pixel as an 8N1 byte; a serial decoder reads the
// transmit line. Every one of the 698 x 742 edge bytes must arrive, in raster
// order, as 8'hFF for an edge and 8'h00 otherwise, equal to the software
// reference, and the output buffer must never overflow. The image is
// synthetic (ramp, disks, rectangle, flat area and noise); the serial path as
// the pixel source is this design's choice.
module tb_canny_serial;
  import canny_ref_pkg::*;
  localparam int W = 708, H = 752, OW = W - 10, OH = H - 10, CPB = 32;
  logic clk = 0, rst = 1, uart_rxd = 1;
  logic [19:0] t_low = '0, t_high = '0;
  logic uart_txd, edge_valid_o, edge_o, tx_overflow_o;
  int checks = 0, failures = 0, n_bytes = 0, mism = 0, n_edges = 0;

  canny_edge_top #(.CLKS_PER_BIT(CPB)) dut (
    .clk, .rst, .src_sel(1'b0), .loopback(1'b0), .uart_rxd, .uart_txd, .pix_valid_i(1'b0),
    .pix_i(8'h00), .t_low, .t_high, .edge_valid_o, .edge_o, .tx_overflow_o);
  always #5 clk = ~clk;

  frame_t img, exp_e;

  // Serial decoder on the transmit line.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
      repeat (CPB) @(posedge clk);
      checks++;
      if (n_bytes >= OW*OH) begin failures++; $display("extra byte %h", b); end
      else if (b != (exp_e[n_bytes] ? 8'hFF : 8'h00)) begin
        failures++;
        if (mism++ < 10) $display("edge byte %0d: %h expected edge=%0d", n_bytes, b, exp_e[n_bytes]);
      end
      if (b == 8'hFF) n_edges++;
      n_bytes++;
    end
  end

  task automatic send(logic [7:0] b);
    uart_rxd <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd <= b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd <= 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    frame_t sm, gx, gy, mg, dir, nms;
    int v [$], tl, th;
    img = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int p = 40 + r / 6;
        if ((r - 380) * (r - 380) + (c - 350) * (c - 350) < 120 * 120) p = 210;
        if ((r - 150) * (r - 150) + (c - 600) * (c - 600) < 30 * 30) p = 15;
        if (r > 560 && r < 700 && c > 40 && c < 300) p = 150;
        if (r > 650 && c > 550) p = 60;                      // flat
        else p += $urandom_range(0, 20);
        img[r*W+c] = (p > 255) ? 255 : p;
      end
    sm = gauss_ref(img, W, H);
    sobel_ref(sm, W-4, H-4, gx, gy, mg);
    dir = new[gx.size()];
    foreach (gx[i]) dir[i] = theta_ref(gx[i], gy[i]);
    nms = nms_ref(mg, dir, W-6, H-6);
    foreach (nms[i]) if (nms[i] != 0) v.push_back(nms[i]);
    v.sort();
    tl = v[v.size() * 90 / 100];
    th = v[v.size() * 97 / 100];
    exp_e = link_ref(nms, W-8, H-8, tl, th);
    t_low <= 20'(tl); t_high <= 20'(th);
    $display("thresholds %0d %0d", tl, th);
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int i = 0; i < W*H; i++) send(8'(img[i]));
    // The backlog of the last row is still being transmitted: wait for it,
    // then two more byte periods in case anything extra follows.
    for (int t = 0; t < 200 * 10 * CPB && n_bytes < OW*OH; t++) @(posedge clk);
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (n_bytes != OW*OH) begin failures++; $display("%0d of %0d edge bytes received", n_bytes, OW*OH); end
    checks++;
    if (tx_overflow_o) begin failures++; $display("serial output buffer overflowed"); end
    checks++;
    if (n_edges == 0) begin failures++; $display("no edges found"); end
    $display("%0d edge bytes received, %0d edges", n_bytes, n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W*H*10*CPB + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
