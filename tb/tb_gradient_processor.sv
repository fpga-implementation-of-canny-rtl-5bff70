// tb_gradient_processor: sends two frames of random 16-bit smoothed pixels
// (the first with input gaps, the second continuous, including the extreme
// values 0 and 65535 so that the gradients reach their full range) and
// compares Gx, Gy and |Gx|+|Gy| of every window with the reference Sobel
// operator. In the continuous frame one result per clock along a row is
// required.
//
// The Sobel masks and the |Gx|+|Gy| magnitude are the design's; the frame
// size is reduced here to keep the test short.
module tb_gradient_processor;
  import canny_ref_pkg::*;
  localparam int W = 9, H = 7, OW = W - 2, OH = H - 2;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [15:0] in_pix = '0;
  logic out_valid;
  logic signed [18:0] gx, gy;
  logic [19:0] mag;
  int checks = 0, failures = 0;

  gradient_processor #(.W(W), .H(H)) dut (.clk, .rst, .in_valid, .in_pix, .out_valid, .gx, .gy, .mag);
  always #5 clk = ~clk;

  frame_t img [2], egx [2], egy [2], emag [2];
  int f_o = 0, n_o = 0, cycle = 0, last_cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) if (out_valid && !rst) begin
    checks++;
    if (f_o > 1) begin failures++; $display("extra output"); end
    else begin
      if (int'(gx) != egx[f_o][n_o] || int'(gy) != egy[f_o][n_o] || int'(mag) != emag[f_o][n_o]) begin
        failures++;
        $display("frame %0d pixel %0d: %0d %0d %0d expected %0d %0d %0d", f_o, n_o, gx, gy, mag,
                 egx[f_o][n_o], egy[f_o][n_o], emag[f_o][n_o]);
      end
      if (f_o == 1 && (n_o % OW) > 0) begin
        checks++;
        if (cycle - last_cycle != 1) begin failures++; $display("not one pixel per clock"); end
      end
      last_cycle = cycle;
      n_o++;
      if (n_o == OW*OH) begin n_o = 0; f_o++; end
    end
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = (f == 1 && (i % W) < 2) ? ((i / W) % 2) * 65535 : $urandom_range(0, 65535);
      if (f == 1) for (int r = 0; r < H; r++) img[f][r*W + 2] = 65535 * ((r + 1) % 2);
      sobel_ref(img[f], W, H, egx[f], egy[f], emag[f]);
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if (f == 0) while ($urandom_range(0, 2) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_pix <= 16'(img[f][i]);
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
