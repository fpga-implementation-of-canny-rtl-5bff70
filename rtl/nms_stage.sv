// nms_stage: the non-maximum suppression stage.
//
// For every gradient pixel the direction is found without an arctangent: a
// pipelined divider forms |Gy|/|Gx| (8 fraction bits) and theta_label sorts
// the quotient into 0/45/90/135 degrees by comparing it with tan(22.5) and
// tan(67.5). The magnitude travels through the divider as a tag, so the
// magnitude and its direction label leave the divider together, DIV_LATENCY
// (39) clocks after the gradient arrived, and are written at the same address
// into the three gradient memories (RAM_MOD1-3) and the direction memory
// (THETA_RAM). Once three rows of magnitudes are stored, the memories send one
// column per clock, one row apart, to supimg_module, and THETA_RAM, read at
// the address of the middle row, sends the direction of the same column. The
// output frame is (W-2) x (H-2) suppressed magnitudes in raster order: the
// magnitude where the pixel is a local maximum along its direction, else 0.
//
// Interface: in_valid with gx, gy (19-bit signed) and mag (20-bit) of a W x H
// gradient frame; out_valid with out_mag (20-bit).
//
// The divider, the frontier labeling, RAM_MOD1-3, THETA_RAM and the 3x3
// suppression window follow the design this implements. Carrying the
// magnitude through the divider, so that magnitude and direction are stored
// together, is a choice of this implementation; the original writes the
// magnitudes first and the directions later.
module nms_stage
  import canny_pkg::*;
#(
  parameter int W           = 702,
  parameter int H           = 746,
  parameter int DIV_LATENCY = 39
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [GRAD_W-1:0] gx,
  input  logic signed [GRAD_W-1:0] gy,
  input  logic [MAG_W-1:0]         mag,
  output logic                     out_valid,
  output logic [MAG_W-1:0]         out_mag
);

  localparam int K     = 3;
  localparam int ABS_W = GRAD_W - 1;        // |Gx|, |Gy| <= 4*65535 < 2^18
  localparam int NUM_W = ABS_W + QFRAC;
  localparam int TAG_W = MAG_W + 1;
  localparam int CW    = $clog2(W + 1);
  localparam int AW    = $clog2(K * W);

  logic [ABS_W-1:0] abs_gx, abs_gy;
  logic             dv;
  logic [NUM_W-1:0] quo;
  logic [TAG_W-1:0] tag;
  theta_t           theta;

  always_comb begin
    abs_gx = ABS_W'((gx < 0) ? -gx : gx);
    abs_gy = ABS_W'((gy < 0) ? -gy : gy);
  end

  div_pipe #(.NUM_W(NUM_W), .DEN_W(ABS_W), .TAG_W(TAG_W), .LATENCY(DIV_LATENCY)) u_div (
    .clk, .rst, .in_valid,
    .num   ({abs_gy, QFRAC'(0)}),
    .den   (abs_gx),
    .tag_in({mag, gx[GRAD_W-1] ^ gy[GRAD_W-1]}),
    .out_valid(dv), .quo, .tag_out(tag)
  );

  theta_label #(.QW(NUM_W)) u_theta (
    .quo, .signs_differ(tag[0]), .theta
  );

  // Gradient memories RAM_MOD1-3 and the direction memory THETA_RAM.
  logic             col_valid, rd_en;
  logic [MAG_W-1:0] col_data [K];
  logic [CW-1:0]    col_c;
  logic [AW-1:0]    rd_addr [K];
  logic [AW-1:0]    wr_addr;
  logic [1:0]       theta_rd;

  line_buffer_bank #(.DW(MAG_W), .K(K), .W(W), .H(H)) u_ram_mod (
    .clk, .rst, .in_valid(dv), .in_data(tag[TAG_W-1:1]),
    .col_valid, .col_data, .col_c, .col_r(),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .wr_addr_o(wr_addr)
  );

  bram_sdp #(.DW(2), .DEPTH(K * W)) u_theta_ram (
    .clk,
    .wea  (dv),
    .addra(wr_addr),
    .dina (theta),
    .enb  (rd_en),
    .addrb(rd_addr[1]),
    .doutb(theta_rd)
  );

  supimg_module u_supimg (
    .clk, .reset(rst),
    .calc_supimg       (col_valid),
    .start_store_supimg(int'(col_c) >= K - 1),
    .mod_rd_data1      (col_data[0]),
    .mod_rd_data2      (col_data[1]),
    .mod_rd_data3      (col_data[2]),
    .theta_rd_data     (theta_t'(theta_rd)),
    .supimg_wr_en      (out_valid),
    .supimg_wr_data    (out_mag)
  );

endmodule
