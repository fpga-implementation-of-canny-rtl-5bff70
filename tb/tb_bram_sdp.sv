// tb_bram_sdp: random writes and reads against a testbench copy of the
// memory; checks the one-clock read latency, that a read with enb low keeps
// the output, and read-first behaviour when both ports use one address.
//
// Read-first behaviour is a choice of this implementation, checked here.
module tb_bram_sdp;
  localparam int DW = 8, DEPTH = 64;
  logic clk = 0, wea = 0, enb = 0;
  logic [5:0] addra = '0, addrb = '0;
  logic [DW-1:0] dina = '0, doutb;
  int checks = 0, failures = 0;

  bram_sdp #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .wea, .addra, .dina, .enb, .addrb, .doutb);
  always #5 clk = ~clk;

  int model [DEPTH];
  int expected = -1;

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      wea <= 1; addra <= 6'(i); dina <= 8'(i * 3 + 1); model[i] = i * 3 + 1;
      @(posedge clk);
    end
    wea <= 0;
    for (int t = 0; t < 1000; t++) begin
      int wa, ra, wd;
      bit w, r;
      w = 1'($urandom); r = 1'($urandom);
      wa = $urandom_range(0, DEPTH - 1); wd = $urandom_range(0, 255);
      ra = (t % 7 == 0) ? wa : $urandom_range(0, DEPTH - 1);
      wea <= w; addra <= 6'(wa); dina <= 8'(wd);
      enb <= r; addrb <= 6'(ra);
      if (r) expected = model[ra];          // old contents: read-first
      @(posedge clk);
      if (w) model[wa] = wd;
      #1;
      if (expected >= 0) begin
        checks++;
        if (int'(doutb) != expected) begin failures++; $display("read %0d expected %0d", doutb, expected); end
      end
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
