// tb_canny_edge_top: end-to-end test of the edge detector at a reduced frame
// size (24 x 18) and a short serial bit period.
//   1. direct stream, frame A with random input gaps;
//   2. direct stream, frame B straight after it at one pixel per clock, where
//      the edge map must also come out at one pixel per clock along a row;
//   3. serial link, frame C sent byte by byte on uart_rxd; its edge bytes
//      (8'hFF / 8'h00) must come back on uart_txd;
//   4. serial loopback: bytes are echoed and the detector receives nothing.
// Every edge flag is compared with the software reference (Gaussian, Sobel,
// direction classes, suppression, linking). The thresholds are taken from
// the reference magnitudes of frame A so that strong, linked-weak and
// discarded-weak pixels all occur. The test counts how often each mechanism
// happened and fails for one that never did.
//
// The mechanisms counted are those of the design (stalls on a gappy input,
// back-to-back frames, the four directions, suppression, linking, the serial
// path and its echo test); the sizes and images are this testbench's own.
module tb_canny_edge_top;
  import canny_ref_pkg::*;
  localparam int W = 24, H = 18, CPB = 4, OW = W - 10, OH = H - 10;
  logic clk = 0, rst = 1, src_sel = 1, loopback = 0, uart_rxd = 1, pix_valid_i = 0;
  logic [7:0] pix_i = '0;
  logic [19:0] t_low = '0, t_high = '0;
  logic uart_txd, edge_valid_o, edge_o, tx_overflow_o;
  int checks = 0, failures = 0;

  canny_edge_top #(.IMG_W(W), .IMG_H(H), .CLKS_PER_BIT(CPB), .FIFO_DEPTH(512)) dut (
    .clk, .rst, .src_sel, .loopback, .uart_rxd, .uart_txd, .pix_valid_i, .pix_i,
    .t_low, .t_high, .edge_valid_o, .edge_o, .tx_overflow_o);
  always #5 clk = ~clk;

  typedef enum int {M_GAPS, M_B2B, M_ONE_PER_CLK, M_DIR0, M_DIR45, M_DIR90, M_DIR135, M_DIV0,
                    M_SUPPRESSED, M_STRONG, M_WEAK_LINKED, M_WEAK_DROPPED, M_SERIAL, M_LOOPBACK, M_N} mech_t;
  int mech [M_N];
  string mech_name [M_N] = '{"input gaps", "back-to-back frames", "one pixel per clock", "dir 0", "dir 45",
    "dir 90", "dir 135", "Gx = 0", "suppressed", "strong", "weak linked", "weak dropped", "serial frame", "loopback echo"};

  frame_t img [3], exp_e [3];
  int cycle = 0, f_o = 0, n_o = 0, last_cycle = 0, line_bytes [$];
  always @(posedge clk) cycle <= cycle + 1;

  function automatic frame_t make_img(int seed);
    frame_t im = new[W*H];
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        int v = 40 + 3 * c;
        if ((r - 9) * (r - 9) + (c - 12 + seed) * (c - 12 + seed) < 30) v = 220;
        if (r > 12 && c > 3 && c < 9) v = 150;
        if (r < 9 && c < 10) v = 100 + 20 * (r / 4);    // flat bands: Gx = 0
        else v += $urandom_range(0, 30);
        im[r*W+c] = (v > 255) ? 255 : v;
      end
    return im;
  endfunction

  // Reference model of the whole chain; also records which mechanisms occur.
  function automatic frame_t ref_chain(const ref frame_t im, input int tl, input int th, ref int cnt [M_N]);
    frame_t sm, gx, gy, mg, dir, nms, e;
    sm = gauss_ref(im, W, H);
    sobel_ref(sm, W-4, H-4, gx, gy, mg);
    dir = new[gx.size()];
    foreach (gx[i]) begin
      dir[i] = theta_ref(gx[i], gy[i]);
      cnt[M_DIR0 + dir[i]]++;
      if (gx[i] == 0) cnt[M_DIV0]++;
    end
    nms = nms_ref(mg, dir, W-6, H-6);
    e = link_ref(nms, W-8, H-8, tl, th);
    for (int r = 1; r < H-9; r++)
        for (int c = 1; c < W-9; c++) begin
          int v = nms[r*(W-8)+c];
          if (v == 0) cnt[M_SUPPRESSED]++;
          else if (v > th) cnt[M_STRONG]++;
          else if (v >= tl) begin
            if (e[(r-1)*OW+c-1]) cnt[M_WEAK_LINKED]++; else cnt[M_WEAK_DROPPED]++;
          end
        end
    return e;
  endfunction

  function automatic void pick_thresholds(const ref frame_t im, ref int tl, ref int th);
    frame_t sm, gx, gy, mg, dir, nms;
    int v [$];
    sm = gauss_ref(im, W, H);
    sobel_ref(sm, W-4, H-4, gx, gy, mg);
    dir = new[gx.size()];
    foreach (gx[i]) dir[i] = theta_ref(gx[i], gy[i]);
    nms = nms_ref(mg, dir, W-6, H-6);
    foreach (nms[i]) if (nms[i] != 0) v.push_back(nms[i]);
    v.sort();
    tl = v[v.size() * 5 / 10];
    th = v[v.size() * 8 / 10];
  endfunction

  always @(posedge clk) if (edge_valid_o && !rst) begin
    checks++;
    if (f_o > 2) begin failures++; $display("extra edge output"); end
    else begin
      if (int'(edge_o) != exp_e[f_o][n_o]) begin
        failures++; $display("frame %0d pixel %0d: %0d expected %0d", f_o, n_o, edge_o, exp_e[f_o][n_o]);
      end
      if (f_o == 1 && (n_o % OW) > 0) begin
        checks++;
        if (cycle - last_cycle != 1) begin failures++; $display("frame B not one pixel per clock"); end
        else mech[M_ONE_PER_CLK]++;
      end
      last_cycle = cycle;
      n_o++;
      if (n_o == OW*OH) begin n_o = 0; f_o++; end
    end
  end

  // Serial decoder on uart_txd.
  initial begin
    forever begin
      logic [7:0] b;
      @(negedge uart_txd);
      if (rst) continue;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = uart_txd; end
      repeat (CPB) @(posedge clk);
      line_bytes.push_back(b);
    end
  end

  task automatic send(logic [7:0] b);
    uart_rxd <= 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd <= b[i]; repeat (CPB) @(posedge clk); end
    uart_rxd <= 1; repeat (CPB) @(posedge clk);
  endtask

  initial begin
    int tl, th;
    for (int f = 0; f < 3; f++) img[f] = make_img(f);
    pick_thresholds(img[0], tl, th);
    for (int f = 0; f < 3; f++) exp_e[f] = ref_chain(img[f], tl, th, mech);
    t_low <= 20'(tl); t_high <= 20'(th);
    $display("thresholds %0d %0d", tl, th);
    repeat (3) @(posedge clk);
    rst <= 0;
    // 1 and 2: direct stream.
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin pix_valid_i <= 0; mech[M_GAPS]++; @(posedge clk); end
        pix_valid_i <= 1; pix_i <= 8'(img[f][i]);
        @(posedge clk);
      end
    mech[M_B2B]++;
    pix_valid_i <= 0;
    repeat (100) @(posedge clk);
    checks++;
    if (f_o != 2) begin failures++; $display("direct frames: %0d done", f_o); end
    // 3: serial frame.
    src_sel <= 0;
    line_bytes.delete();
    for (int i = 0; i < W*H; i++) send(8'(img[2][i]));
    repeat (40 * CPB) @(posedge clk);
    checks++;
    if (f_o != 3) begin failures++; $display("serial frame not finished: %0d pixels", n_o); end
    checks++;
    if (line_bytes.size() != OW*OH) begin failures++; $display("%0d edge bytes on the line", line_bytes.size()); end
    else begin
      mech[M_SERIAL]++;
      foreach (line_bytes[i]) begin
        checks++;
        if (line_bytes[i] != (exp_e[2][i] ? 8'hFF : 8'h00)) begin failures++; $display("edge byte %0d: %h", i, line_bytes[i]); end
      end
    end
    // 4: loopback.
    loopback <= 1;
    line_bytes.delete();
    for (int t = 0; t < 4; t++) send(8'(t * 50 + 7));
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (line_bytes.size() != 4) begin failures++; $display("echoed %0d bytes", line_bytes.size()); end
    else begin
      foreach (line_bytes[t]) begin
        checks++;
        if (line_bytes[t] != t * 50 + 7) begin failures++; $display("echo %0d wrong", t); end
      end
      mech[M_LOOPBACK]++;
    end
    checks++;
    if (f_o != 3 || n_o != 0) begin failures++; $display("detector received loopback bytes"); end
    checks++;
    if (tx_overflow_o) begin failures++; $display("serial buffer overflow"); end
    for (int m = 0; m < M_N; m++) begin
      checks++;
      $display("%-20s %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("mechanism '%s' never happened", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
