// tb_nms_stage: sends two frames of random gradients (Gx, Gy in the full
// 19-bit range or small, so that all four directions and equal neighbours
// occur; magnitude |Gx|+|Gy|) and compares every suppressed magnitude with
// the reference: direction class from the tangent frontiers, kept when not
// smaller than both neighbours along that direction. Counts that every
// direction was used and that both kept and suppressed pixels occurred.
//
// The frontier constants and neighbour pairs are those of the RTL's
// convention; the frame size is reduced here.
module tb_nms_stage;
  import canny_ref_pkg::*;
  localparam int W = 12, H = 8, OW = W - 2, OH = H - 2;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [18:0] gx = '0, gy = '0;
  logic [19:0] mag = '0;
  logic out_valid;
  logic [19:0] out_mag;
  int checks = 0, failures = 0;

  nms_stage #(.W(W), .H(H)) dut (.clk, .rst, .in_valid, .gx, .gy, .mag, .out_valid, .out_mag);
  always #5 clk = ~clk;

  frame_t igx [2], igy [2], imag [2], ith [2], exp_o [2];
  int f_o = 0, n_o = 0, kept = 0, suppressed = 0, dir_seen [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (out_valid && !rst) begin
    checks++;
    if (f_o > 1) begin failures++; $display("extra output"); end
    else begin
      if (int'(out_mag) != exp_o[f_o][n_o]) begin
        failures++; $display("frame %0d pixel %0d: %0d expected %0d", f_o, n_o, out_mag, exp_o[f_o][n_o]);
      end
      if (exp_o[f_o][n_o] != 0) kept++; else suppressed++;
      n_o++;
      if (n_o == OW*OH) begin n_o = 0; f_o++; end
    end
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      igx[f] = new[W*H]; igy[f] = new[W*H]; imag[f] = new[W*H]; ith[f] = new[W*H];
      foreach (igx[f][i]) begin
        if ($urandom_range(0, 1)) begin
          igx[f][i] = int'($urandom_range(0, 262140)) - 131070;
          igy[f][i] = int'($urandom_range(0, 262140)) - 131070;
        end else begin
          igx[f][i] = int'($urandom_range(0, 6)) - 3;
          igy[f][i] = int'($urandom_range(0, 6)) - 3;
        end
        if (i == 5) begin igx[f][i] = 262140; igy[f][i] = -262140; end
        imag[f][i] = iabs(igx[f][i]) + iabs(igy[f][i]);
        ith[f][i] = theta_ref(igx[f][i], igy[f][i]);
      end
      for (int r = 1; r < H-1; r++) for (int c = 1; c < W-1; c++) dir_seen[ith[f][r*W+c]]++;
      exp_o[f] = nms_ref(imag[f], ith[f], W, H);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; gx <= 19'(igx[f][i]); gy <= 19'(igy[f][i]); mag <= 20'(imag[f][i]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (80) @(posedge clk);
    checks++;
    if (f_o != 2) begin failures++; $display("only %0d frames, %0d pixels", f_o, n_o); end
    for (int d = 0; d < 4; d++) begin
      checks++;
      if (dir_seen[d] == 0) begin failures++; $display("direction %0d never used", d); end
    end
    checks++;
    if (kept == 0 || suppressed == 0) begin failures++; $display("kept %0d suppressed %0d", kept, suppressed); end
    $display("directions %0d %0d %0d %0d kept %0d suppressed %0d", dir_seen[0], dir_seen[1], dir_seen[2], dir_seen[3], kept, suppressed);
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
