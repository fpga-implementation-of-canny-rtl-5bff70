// tb_div_pipe: feeds one operand pair per clock (random, with random idle
// clocks, and some division by zero) and checks that each quotient and its tag
// appear exactly LATENCY (39) clocks after the clock edge that takes the
// operands (LATENCY+1 on the testbench cycle count), in order, and equal
// num / den (all ones for den = 0).
//
// The 39-clock latency is the design's; the operands are this testbench's.
module tb_div_pipe;
  localparam int NUM_W = 26, DEN_W = 18, TAG_W = 21, LAT = 39;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [NUM_W-1:0] num = '0, quo;
  logic [DEN_W-1:0] den = '0;
  logic [TAG_W-1:0] tag_in = '0, tag_out;
  logic out_valid;
  int checks = 0, failures = 0, cycle = 0;

  div_pipe #(.NUM_W(NUM_W), .DEN_W(DEN_W), .TAG_W(TAG_W), .LATENCY(LAT)) dut (
    .clk, .rst, .in_valid, .num, .den, .tag_in, .out_valid, .quo, .tag_out);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  longint e_q [$]; int e_tag [$], e_cyc [$];

  always @(posedge clk) if (out_valid && !rst) begin
    checks++;
    if (e_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      longint q; int tg, cy;
      q = e_q.pop_front(); tg = e_tag.pop_front(); cy = e_cyc.pop_front();
      if (longint'(quo) != q || int'(tag_out) != tg || cycle - cy != LAT + 1) begin
        failures++;
        $display("quo %0d tag %0d after %0d clocks, expected %0d %0d after %0d", quo, tag_out, cycle - cy, q, tg, LAT);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < 600; t++) begin
      longint n, d;
      if ($urandom_range(0, 3) == 0) begin in_valid <= 0; @(posedge clk); continue; end
      n = $urandom_range(0, (1 << NUM_W) - 1);
      case ($urandom_range(0, 9))
        0:       d = 0;
        1:       d = $urandom_range(1, 20);
        default: d = $urandom_range(0, (1 << DEN_W) - 1);
      endcase
      if (t % 50 == 7) begin n = (1 << NUM_W) - 1; d = 1; end
      in_valid <= 1; num <= NUM_W'(n); den <= DEN_W'(d); tag_in <= TAG_W'(t);
      e_q.push_back(d == 0 ? (1 << NUM_W) - 1 : n / d);
      e_tag.push_back(t); e_cyc.push_back(cycle);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (e_q.size() != 0) begin failures++; $display("%0d results missing", e_q.size()); end
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
