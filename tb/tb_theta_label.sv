// tb_theta_label: sweeps the quotient through and around both frontiers
// (tan 22.5 = 106/256, tan 67.5 = 618/256) with both sign relations and
// checks the direction class: 0 below the first frontier, 90 from the second
// one up, 45 or 135 (same or opposite signs) in between.
//
// The frontier angles are the design's; their 8-bit fixed-point values are
// this implementation's.
module tb_theta_label;
  import canny_pkg::*;
  logic clk = 0;
  logic [25:0] quo;
  logic signs_differ;
  theta_t theta;
  int checks = 0, failures = 0;

  theta_label #(.QW(26)) dut (.quo, .signs_differ, .theta);
  always #5 clk = ~clk;

  task automatic try(longint q, bit s);
    theta_t e;
    quo = 26'(q); signs_differ = s;
    #1;
    // 256*tan(22.5) = 105.97, 256*tan(67.5) = 618.04
    if (real'(q) < 105.97)      e = DIR_0;
    else if (real'(q) > 618.04 || q == 618) e = DIR_90;
    else                        e = s ? DIR_135 : DIR_45;
    checks++;
    if (theta != e) begin failures++; $display("q=%0d s=%0d: %0d expected %0d", q, s, theta, e); end
    @(posedge clk);
  endtask

  initial begin
    for (longint q = 0; q < 800; q++) begin try(q, 0); try(q, 1); end
    for (int t = 0; t < 200; t++) try($urandom_range(0, (1 << 26) - 1), 1'($urandom));
    try((1 << 26) - 1, 0);
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
