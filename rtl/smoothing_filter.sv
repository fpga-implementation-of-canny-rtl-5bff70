// smoothing_filter: the Gaussian smoothing stage.
//
// Five parallel row memories receive the same raw pixels; once five rows are
// stored they each send one pixel per clock from the same column, one row
// apart, into the last column of a 5x5 window that shifts left one column per
// clock. The Gaussian mask turns each full window into one smoothed pixel per
// clock. The first result is the pixel P(2,2); the output frame is therefore
// (W-4) x (H-4), in raster order.
//
// Interface: in_valid/in_pix is the raw W x H 8-bit frame stream. out_valid
// pulses with the 16-bit unnormalised smoothed pixel (see gauss_mask5x5).
// Latency from the read of a column to its result is 4 clocks (memory read,
// window register, two adder steps).
//
// Five memories, the 5x5 window and one smoothed pixel per clock follow the
// design this implements; the register stages and the unnormalised output are
// choices of this implementation.
module smoothing_filter
  import canny_pkg::*;
#(
  parameter int W = 708,
  parameter int H = 752
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             out_valid,
  output logic [SMO_W-1:0] out_pix
);

  localparam int K  = 5;
  localparam int CW = $clog2(W + 1);

  logic             col_valid;
  logic [PIX_W-1:0] col_data [K];
  logic [CW-1:0]    col_c;
  logic [PIX_W-1:0] win [K][K];
  logic             win_valid;

  line_buffer_bank #(.DW(PIX_W), .K(K), .W(W), .H(H)) u_bank (
    .clk, .rst, .in_valid, .in_data(in_pix),
    .col_valid, .col_data, .col_c, .col_r(),
    .rd_en_o(), .rd_addr_o(), .wr_addr_o()
  );

  shift_window #(.DW(PIX_W), .K(K)) u_win (
    .clk, .shift(col_valid), .col_in(col_data), .win
  );

  // The window is complete once the column just shifted in is column K-1 or later.
  always_ff @(posedge clk) begin
    if (rst) win_valid <= 1'b0;
    else     win_valid <= col_valid && (int'(col_c) >= K - 1);
  end

  gauss_mask5x5 u_mask (
    .clk, .rst, .in_valid(win_valid), .win, .out_valid, .out_pix
  );

endmodule
