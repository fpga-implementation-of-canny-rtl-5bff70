// canny_edge_top: Canny edge detector for a streamed grey-level frame.
//
// Four pipelined stages turn an IMG_W x IMG_H 8-bit frame, arriving in raster
// order, into a one-bit edge map of (IMG_W-10) x (IMG_H-10) pixels:
//   smoothing_filter    5x5 Gaussian (sigma 1.4) over five parallel row memories
//   gradient_processor  3x3 Sobel Gx, Gy and |Gx|+|Gy| over three row memories
//   nms_stage           direction by division and tangent frontiers, then
//                       non-maximum suppression over three row memories
//   edge_link_stage     double threshold and linking of weak to strong edges
// Each stage loses a border (4, 2, 2 and 2 pixels) and with a continuous
// input every stage delivers one pixel per clock.
//
// Pixel source and sink (src_sel):
//   0  serial: pixels come from the RS-232 receiver, and every edge flag goes
//      back to the host through the FIFO buffer and transmitter as one byte,
//      8'hFF for an edge and 8'h00 otherwise. With loopback high the serial
//      link only echoes the received bytes (link test) and the detector gets
//      no pixels.
//   1  direct: pixels come from pix_valid_i/pix_i (a camera-side stream) and
//      edge flags leave on edge_valid_o/edge_o only.
// edge_valid_o/edge_o show every edge flag in both modes. t_low and t_high
// are the linking thresholds, in units of the unnormalised gradient magnitude
// (the smoothed pixels carry the Gaussian weight sum 159). tx_overflow_o is
// raised if the serial output buffer ever drops a byte.
// Reset is synchronous and active high.
//
// The order of the stages, their borders and the one-pixel-per-clock rate
// follow the Canny design this implements. The direct stream, the src_sel and
// loopback modes, the edge byte code and the threshold ports are choices of
// this implementation.
module canny_edge_top
  import canny_pkg::*;
#(
  parameter int IMG_W        = 708,
  parameter int IMG_H        = 752,
  parameter int CLKS_PER_BIT = 868,
  parameter int FIFO_DEPTH   = 4096,
  parameter int DIV_LATENCY  = 39
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             src_sel,
  input  logic             loopback,
  input  logic             uart_rxd,
  output logic             uart_txd,
  input  logic             pix_valid_i,
  input  logic [PIX_W-1:0] pix_i,
  input  logic [MAG_W-1:0] t_low,
  input  logic [MAG_W-1:0] t_high,
  output logic             edge_valid_o,
  output logic             edge_o,
  output logic             tx_overflow_o
);

  logic                     rx_valid;
  logic [7:0]               rx_data;
  logic                     in_valid;
  logic [PIX_W-1:0]         in_pix;
  logic                     smo_valid, grad_valid, nms_valid;
  logic [SMO_W-1:0]         smo_pix;
  logic signed [GRAD_W-1:0] gx, gy;
  logic [MAG_W-1:0]         mag, nms_mag;

  rs232_com #(.CLKS_PER_BIT(CLKS_PER_BIT), .FIFO_DEPTH(FIFO_DEPTH)) u_rs232 (
    .clk, .rst, .loopback,
    .rxd(uart_rxd), .txd(uart_txd),
    .rx_valid, .rx_data,
    .px_valid(edge_valid_o && !src_sel),
    .px_data (edge_o ? 8'hFF : 8'h00),
    .overflow(tx_overflow_o)
  );

  assign in_valid = src_sel ? pix_valid_i : rx_valid;
  assign in_pix   = src_sel ? pix_i       : rx_data;

  smoothing_filter #(.W(IMG_W), .H(IMG_H)) u_smooth (
    .clk, .rst, .in_valid, .in_pix,
    .out_valid(smo_valid), .out_pix(smo_pix)
  );

  gradient_processor #(.W(IMG_W - 4), .H(IMG_H - 4)) u_grad (
    .clk, .rst, .in_valid(smo_valid), .in_pix(smo_pix),
    .out_valid(grad_valid), .gx, .gy, .mag
  );

  nms_stage #(.W(IMG_W - 6), .H(IMG_H - 6), .DIV_LATENCY(DIV_LATENCY)) u_nms (
    .clk, .rst, .in_valid(grad_valid), .gx, .gy, .mag,
    .out_valid(nms_valid), .out_mag(nms_mag)
  );

  edge_link_stage #(.W(IMG_W - 8), .H(IMG_H - 8)) u_link (
    .clk, .rst, .in_valid(nms_valid), .in_mag(nms_mag), .t_low, .t_high,
    .out_valid(edge_valid_o), .out_edge(edge_o)
  );

endmodule
