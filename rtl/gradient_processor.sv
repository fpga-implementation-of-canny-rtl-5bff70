// gradient_processor: the "finding gradients" stage.
//
// The smoothed pixels are written into three parallel memories (IDx_Mem1-3)
// that, once three rows are stored, each send one pixel per clock of the same
// column, one row apart, into the last column of a 3x3 window shifting left
// one column per clock. The gradient mask computes Gx and Gy of every full
// window, and the stage adds their absolute values into the gradient
// magnitude |G| = |Gx| + |Gy| (the Manhattan form of the edge strength).
// Output frame: (W-2) x (H-2) values in raster order, one per clock when the
// input is continuous.
//
// Interface: in_valid/in_pix is the W x H smoothed frame. out_valid pulses
// with gx, gy (19-bit signed) and mag (20-bit). Latency from a column read
// to the result: 4 clocks (memory, window, gradient register, magnitude
// register).
//
// The three memories, the shifting window and |Gx|+|Gy| follow the design
// this implements; the register stages are a choice of this implementation.
module gradient_processor
  import canny_pkg::*;
#(
  parameter int W = 704,
  parameter int H = 748
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic [SMO_W-1:0]         in_pix,
  output logic                     out_valid,
  output logic signed [GRAD_W-1:0] gx,
  output logic signed [GRAD_W-1:0] gy,
  output logic [MAG_W-1:0]         mag
);

  localparam int K  = 3;
  localparam int CW = $clog2(W + 1);

  logic             col_valid, win_valid, grad_valid;
  logic [SMO_W-1:0] col_data [K];
  logic [CW-1:0]    col_c;
  logic [SMO_W-1:0] win [K][K];
  logic signed [GRAD_W-1:0] idxx, idyy, gx_r, gy_r;

  line_buffer_bank #(.DW(SMO_W), .K(K), .W(W), .H(H)) u_idx_mem (
    .clk, .rst, .in_valid, .in_data(in_pix),
    .col_valid, .col_data, .col_c, .col_r(),
    .rd_en_o(), .rd_addr_o(), .wr_addr_o()
  );

  shift_window #(.DW(SMO_W), .K(K)) u_win (
    .clk, .shift(col_valid), .col_in(col_data), .win
  );

  mult_m_idx u_mask (
    .idx00(win[0][0]), .idx01(win[0][1]), .idx02(win[0][2]),
    .idx10(win[1][0]), .idx11(win[1][1]), .idx12(win[1][2]),
    .idx20(win[2][0]), .idx21(win[2][1]), .idx22(win[2][2]),
    .idxx, .idyy
  );

  function automatic logic [MAG_W-1:0] absval(input logic signed [GRAD_W-1:0] v);
    return (v < 0) ? MAG_W'(-v) : MAG_W'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (win_valid) begin
      gx_r <= idxx;
      gy_r <= idyy;
    end
    if (grad_valid) begin
      gx  <= gx_r;
      gy  <= gy_r;
      mag <= absval(gx_r) + absval(gy_r);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      win_valid  <= 1'b0;
      grad_valid <= 1'b0;
      out_valid  <= 1'b0;
    end else begin
      win_valid  <= col_valid && (int'(col_c) >= K - 1);
      grad_valid <= win_valid;
      out_valid  <= grad_valid;
    end
  end

endmodule
