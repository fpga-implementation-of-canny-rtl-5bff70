// tb_supimg_module: drives rows of random gradient columns into the
// suppression processor the way the gradient memories do (three magnitudes
// and the middle-row direction per clock, start_store_supimg from the third
// column of a row on, some idle clocks in between) and compares each written
// magnitude with the non-maximum rule worked out in the testbench.
//
// The port names follow the design's suppression module; the stimulus is
// random.
module tb_supimg_module;
  import canny_pkg::*;
  localparam int NC = 10, NR = 30;
  logic clk = 0, reset = 1, calc = 0, store = 0;
  logic [19:0] d1 = '0, d2 = '0, d3 = '0;
  theta_t th = DIR_0;
  logic wr_en;
  logic [19:0] wr_data;
  int checks = 0, failures = 0, kept = 0, supp = 0;

  supimg_module dut (.clk, .reset, .calc_supimg(calc), .start_store_supimg(store),
    .mod_rd_data1(d1), .mod_rd_data2(d2), .mod_rd_data3(d3), .theta_rd_data(th),
    .supimg_wr_en(wr_en), .supimg_wr_data(wr_data));
  always #5 clk = ~clk;

  int m [3][NC], t [NC];
  int exp_q [$];

  always @(posedge clk) if (wr_en && !reset) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      int e;
      e = exp_q.pop_front();
      if (int'(wr_data) != e) begin failures++; $display("%0d expected %0d", wr_data, e); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    for (int r = 0; r < NR; r++) begin
      for (int c = 0; c < NC; c++) begin
        for (int i = 0; i < 3; i++) m[i][c] = $urandom_range(0, 9);
        t[c] = $urandom_range(0, 3);
      end
      for (int c = 1; c < NC - 1; c++) begin
        int a, b;
        case (t[c])
          0: begin a = m[1][c-1]; b = m[1][c+1]; end
          1: begin a = m[0][c+1]; b = m[2][c-1]; end
          2: begin a = m[0][c];   b = m[2][c];   end
          default: begin a = m[0][c-1]; b = m[2][c+1]; end
        endcase
        exp_q.push_back((m[1][c] >= a && m[1][c] >= b) ? m[1][c] : 0);
        if (m[1][c] >= a && m[1][c] >= b) kept++; else supp++;
      end
      for (int c = 0; c < NC; c++) begin
        if ($urandom_range(0, 3) == 0) begin calc <= 0; store <= 0; @(posedge clk); end
        calc <= 1; store <= (c >= 2);
        d1 <= 20'(m[0][c]); d2 <= 20'(m[1][c]); d3 <= 20'(m[2][c]); th <= theta_t'(t[c]);
        @(posedge clk);
      end
    end
    calc <= 0; store <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    checks++;
    if (kept == 0 || supp == 0) failures++;
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
