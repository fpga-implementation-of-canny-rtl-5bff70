// tb_smoothing_filter: sends two random frames (the first with random input
// gaps, the second at one pixel per clock) and compares every smoothed pixel
// with the reference 5x5 weighted sum. In the continuous frame the stage must
// give one result per clock along a row, and its latency from the pixel that
// completes a window to the result is checked against the expected 6 clocks
// (write, memory read, window register, two adder steps, output sample).
//
// The kernel is the design's sigma = 1.4 kernel; the frame size is reduced
// here.
module tb_smoothing_filter;
  import canny_ref_pkg::*;
  localparam int W = 11, H = 9, OW = W - 4, OH = H - 4;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0] in_pix = '0;
  logic out_valid;
  logic [15:0] out_pix;
  int checks = 0, failures = 0;

  smoothing_filter #(.W(W), .H(H)) dut (.clk, .rst, .in_valid, .in_pix, .out_valid, .out_pix);
  always #5 clk = ~clk;

  frame_t img [2], exp_o [2];
  int f_o = 0, n_o = 0, cycle = 0, last_cycle = 0, in_cycle [2][$];
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (out_valid && !rst) begin
    checks++;
    if (f_o > 1) begin failures++; $display("extra output"); end
    else begin
      if (int'(out_pix) != exp_o[f_o][n_o]) begin
        failures++; $display("frame %0d pixel %0d: %0d expected %0d", f_o, n_o, out_pix, exp_o[f_o][n_o]);
      end
      if (f_o == 1) begin
        // Window of output (r,c) completes with input pixel (r+4, c+4).
        int r, c, t_in;
        r = n_o / OW; c = n_o % OW; t_in = in_cycle[1][(r+4)*W + c+4];
        checks++;
        if (cycle - t_in != 6) begin failures++; $display("latency %0d", cycle - t_in); end
        if (c > 0) begin
          checks++;
          if (cycle - last_cycle != 1) begin failures++; $display("not one pixel per clock"); end
        end
      end
      last_cycle = cycle;
      n_o++;
      if (n_o == OW*OH) begin n_o = 0; f_o++; end
    end
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = $urandom_range(0, 255);
      if (f == 1) begin img[f][0] = 255; img[f][W*H-1] = 0; end
      exp_o[f] = gauss_ref(img[f], W, H);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_pix <= 8'(img[f][i]);
        in_cycle[f].push_back(cycle);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (30) @(posedge clk);
    checks++;
    if (f_o != 2) begin failures++; $display("only %0d frames, %0d pixels", f_o, n_o); end
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
