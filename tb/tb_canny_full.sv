// tb_canny_full: one complete 708 x 752 frame through the edge detector with
// every parameter at its default, fed as a direct pixel stream at one pixel
// per clock. The frame holds a brightness ramp, bright disks, a rectangle,
// flat areas and noise. Every one of the 698 x 742 edge flags is compared
// with the software reference; the edge map must come out at one pixel per
// clock along each row, and the whole frame must be done within the frame
// time plus a small pipeline delay (throughput of one pixel per clock).
//
// The 708 x 752 size and the one-pixel-per-clock rate are those the design
// was evaluated with; the image itself is synthetic.
module tb_canny_full;
  import canny_ref_pkg::*;
  localparam int W = 708, H = 752, OW = W - 10, OH = H - 10;
  logic clk = 0, rst = 1, pix_valid_i = 0;
  logic [7:0] pix_i = '0;
  logic [19:0] t_low = '0, t_high = '0;
  logic uart_txd, edge_valid_o, edge_o, tx_overflow_o;
  int checks = 0, failures = 0, n_edges = 0, mism = 0;

  canny_edge_top dut (
    .clk, .rst, .src_sel(1'b1), .loopback(1'b0), .uart_rxd(1'b1), .uart_txd, .pix_valid_i, .pix_i,
    .t_low, .t_high, .edge_valid_o, .edge_o, .tx_overflow_o);
  always #5 clk = ~clk;

  frame_t img, exp_e;
  int cycle = 0, n_o = 0, last_cycle = 0, gaps = 0, start_cycle = 0, end_cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (edge_valid_o && !rst) begin
    if (n_o >= OW*OH) begin failures++; checks++; $display("extra edge output"); end
    else begin
      checks++;
      if (int'(edge_o) != exp_e[n_o]) begin
        failures++;
        if (mism++ < 10) $display("pixel %0d: %0d expected %0d", n_o, edge_o, exp_e[n_o]);
      end
      if (edge_o) n_edges++;
      if ((n_o % OW) > 0 && cycle - last_cycle != 1) gaps++;
      last_cycle = cycle;
      n_o++;
      if (n_o == OW*OH) end_cycle = cycle;
    end
  end

  initial begin
    frame_t sm, gx, gy, mg, dir, nms;
    int v [$], tl, th;
    img = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int p = 30 + c / 5;
        if ((r - 200) * (r - 200) + (c - 300) * (c - 300) < 90 * 90) p = 230;
        if ((r - 520) * (r - 520) + (c - 500) * (c - 500) < 40 * 40) p = 20;
        if (r > 600 && r < 700 && c > 80 && c < 260) p = 170;
        if (r < 100 && c < 150) p = 90;                      // flat
        else p += $urandom_range(0, 24);
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
    start_cycle = cycle;
    for (int i = 0; i < W*H; i++) begin
      pix_valid_i <= 1; pix_i <= 8'(img[i]);
      @(posedge clk);
    end
    pix_valid_i <= 0;
    repeat (200) @(posedge clk);
    checks++;
    if (n_o != OW*OH) begin failures++; $display("%0d of %0d edge flags", n_o, OW*OH); end
    checks++;
    if (gaps != 0) begin failures++; $display("%0d gaps inside rows", gaps); end
    checks++;
    if (end_cycle - start_cycle > W*H + 100) begin failures++; $display("frame took %0d clocks", end_cycle - start_cycle); end
    checks++;
    if (n_edges == 0) begin failures++; $display("no edges found"); end
    $display("frame of %0d pixels done in %0d clocks, %0d edge pixels", W*H, end_cycle - start_cycle, n_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (W*H + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
