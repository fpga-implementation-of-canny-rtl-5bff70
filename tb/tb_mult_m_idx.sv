// tb_mult_m_idx: applies random and extreme 3x3 windows to the gradient mask
// and compares Gx and Gy with the Sobel sums computed in the testbench.
//
// The weights are the Sobel masks of the design; the windows are random.
module tb_mult_m_idx;
  logic clk = 0;
  logic [15:0] p [3][3];
  logic signed [18:0] idxx, idyy;
  int checks = 0, failures = 0;

  mult_m_idx dut (
    .idx00(p[0][0]), .idx01(p[0][1]), .idx02(p[0][2]),
    .idx10(p[1][0]), .idx11(p[1][1]), .idx12(p[1][2]),
    .idx20(p[2][0]), .idx21(p[2][1]), .idx22(p[2][2]),
    .idxx, .idyy);
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ex, ey;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          case (t % 4)
            0:       p[i][j] = (j == 2) ? 16'hFFFF : 16'h0;      // strongest positive Gx
            1:       p[i][j] = (i == 2) ? 16'hFFFF : 16'h0;      // strongest negative Gy
            default: p[i][j] = 16'($urandom);
          endcase
      #1;
      ex = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
      ey = (p[0][0] + 2*p[0][1] + p[0][2]) - (p[2][0] + 2*p[2][1] + p[2][2]);
      checks++;
      if (int'(idxx) != ex || int'(idyy) != ey) begin
        failures++; $display("window %0d: %0d %0d expected %0d %0d", t, idxx, idyy, ex, ey);
      end
      @(posedge clk);
    end
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
