// tb_edge_link_stage: sends two frames of random suppressed magnitudes
// (many zeros, values around both thresholds) and compares every edge flag
// with the reference double-threshold linking. Counts strong pixels, weak
// pixels kept through a strong neighbour and weak pixels discarded, and fails
// if any of the three never occurred.
//
// The thresholds used here are the testbench's own; the design leaves them
// to the user.
module tb_edge_link_stage;
  import canny_ref_pkg::*;
  localparam int W = 12, H = 9, OW = W - 2, OH = H - 2;
  localparam int TL = 300, TH = 700;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [19:0] in_mag = '0;
  logic out_valid, out_edge;
  int checks = 0, failures = 0;

  edge_link_stage #(.W(W), .H(H)) dut (.clk, .rst, .in_valid, .in_mag,
    .t_low(20'(TL)), .t_high(20'(TH)), .out_valid, .out_edge);
  always #5 clk = ~clk;

  frame_t img [2], exp_o [2];
  int f_o = 0, n_o = 0, n_strong = 0, n_weak_kept = 0, n_weak_lost = 0;

  always @(posedge clk) if (out_valid && !rst) begin
    checks++;
    if (f_o > 1) begin failures++; $display("extra output"); end
    else begin
      int v;
      v = img[f_o][(n_o / OW + 1) * W + n_o % OW + 1];
      if (int'(out_edge) != exp_o[f_o][n_o]) begin
        failures++; $display("frame %0d pixel %0d: %0d expected %0d", f_o, n_o, out_edge, exp_o[f_o][n_o]);
      end
      if (v > TH) n_strong++;
      else if (v >= TL) begin
        if (exp_o[f_o][n_o] != 0) n_weak_kept++; else n_weak_lost++;
      end
      n_o++;
      if (n_o == OW*OH) begin n_o = 0; f_o++; end
    end
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) begin
        case ($urandom_range(0, 5))
          0, 1:    img[f][i] = 0;
          2:       img[f][i] = $urandom_range(0, 1000);
          3:       img[f][i] = $urandom_range(TL - 1, TL + 1);
          4:       img[f][i] = $urandom_range(TH - 1, TH + 1);
          default: img[f][i] = $urandom_range(0, 1048575);
        endcase
      end
      exp_o[f] = link_ref(img[f], W, H, TL, TH);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_mag <= 20'(img[f][i]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (f_o != 2) begin failures++; $display("only %0d frames, %0d pixels", f_o, n_o); end
    checks++;
    if (n_strong == 0 || n_weak_kept == 0 || n_weak_lost == 0) begin
      failures++; $display("strong %0d weak kept %0d weak discarded %0d", n_strong, n_weak_kept, n_weak_lost);
    end
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
