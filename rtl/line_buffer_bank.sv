// line_buffer_bank: K parallel row memories that turn a raster pixel stream
// into a stream of K-pixel window columns.
//
// Every incoming pixel is written, at the same address, into all K memories,
// so each memory holds the same copy of the last rows of the frame. Memory k
// is read at the address of row r+k, column c, so in one clock the bank
// delivers column c of rows r..r+K-1 (pixel (R,C), (R+1,C), ...). The
// read pointer then walks along the frame one column per clock; after the last
// column of the last window row (row H-K) it jumps over the K-1 bottom rows,
// which are only ever read as lower rows, to the first pixel of the next frame.
//
// A read is issued whenever the pixel it needs last, (r+K-1, c), has been
// written, so with a continuous input the bank gives one column per clock and
// with a bursty input (a serial link) it follows the input. There is no
// back-pressure: the writer is never more than (K-1)*W+1 pixels ahead of the
// read pointer, and each memory holds K rows (DEPTH = K*W), so no unread word
// is overwritten.
//
// Interface: in_valid/in_data is the raster input (W pixels per row, H rows
// per frame, frames back to back). col_valid pulses one clock after a read
// (registered memory read) with col_data[k] = pixel (col_r+k, col_c).
// rd_en_o/rd_addr_o/wr_addr_o expose the bank's addresses so that a stage can
// keep a side memory (the direction memory) in step with the bank.
//
// The structure (K memories with identical contents, read one row apart into
// a shifting window) is the one of the Canny design this follows. The K-row
// circular depth, starting each read as soon as its data is stored, and the
// jump at the end of a frame are choices of this implementation.
module line_buffer_bank #(
  parameter int DW    = 8,
  parameter int K     = 5,
  parameter int W     = 708,
  parameter int H     = 752,
  parameter int DEPTH = K * W,
  parameter int AW    = $clog2(DEPTH),
  parameter int CW    = $clog2(W + 1),
  parameter int RW    = $clog2(H + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          col_valid,
  output logic [DW-1:0] col_data [K],
  output logic [CW-1:0] col_c,
  output logic [RW-1:0] col_r,
  output logic          rd_en_o,
  output logic [AW-1:0] rd_addr_o [K],
  output logic [AW-1:0] wr_addr_o
);

  localparam int LW    = $clog2(DEPTH + 2);
  localparam int NEED  = (K - 1) * W;   // lead needed beyond the read position
  localparam int SKIP  = (K - 1) * W + 1;

  logic [AW-1:0] wr_addr, rd_addr;
  logic [LW-1:0] lead;                  // pixels written ahead of the read position
  logic [CW-1:0] rd_c;
  logic [RW-1:0] rd_r;
  logic          fire, last_col, last_win;

  assign fire     = (int'(lead) > NEED);
  assign last_col = (int'(rd_c) == W - 1);
  assign last_win = last_col && (int'(rd_r) == H - K);

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input int b);
    int s;
    s = int'(a) + b;
    if (s >= DEPTH) s = s - DEPTH;
    return AW'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_addr <= '0;
      rd_addr <= '0;
      lead    <= '0;
      rd_c    <= '0;
      rd_r    <= '0;
    end else begin
      if (in_valid) wr_addr <= wrap_add(wr_addr, 1);
      lead <= LW'(int'(lead) + (in_valid ? 1 : 0) - (fire ? (last_win ? SKIP : 1) : 0));
      if (fire) begin
        rd_addr <= wrap_add(rd_addr, last_win ? SKIP : 1);
        if (last_col) begin
          rd_c <= '0;
          rd_r <= last_win ? '0 : rd_r + 1'b1;
        end else begin
          rd_c <= rd_c + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < K; k++) rd_addr_o[k] = wrap_add(rd_addr, k * W);
  end

  for (genvar k = 0; k < K; k++) begin : g_mem
    bram_sdp #(.DW(DW), .DEPTH(DEPTH)) u_mem (
      .clk  (clk),
      .wea  (in_valid),
      .addra(wr_addr),
      .dina (in_data),
      .enb  (fire),
      .addrb(rd_addr_o[k]),
      .doutb(col_data[k])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col_valid <= 1'b0;
      col_c     <= '0;
      col_r     <= '0;
    end else begin
      col_valid <= fire;
      if (fire) begin
        col_c <= rd_c;
        col_r <= rd_r;
      end
    end
  end

  assign rd_en_o   = fire;
  assign wr_addr_o = wr_addr;

  // The writer may never lap the oldest row still to be read.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) int'(lead) <= NEED + 1);

endmodule
