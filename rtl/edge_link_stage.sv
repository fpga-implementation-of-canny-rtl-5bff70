// edge_link_stage: double thresholding and edge linking.
//
// The suppressed magnitudes are written into three parallel memories
// (SUPIMG_MEM1-3) which, once three rows are stored, send one column per
// clock, one row apart, into a 3x3 window (two registered columns plus the
// arriving one). For the window centre:
//   magnitude >  t_high                        -> strong edge, kept;
//   t_low <= magnitude <= t_high (weak edge)   -> kept only if one of its
//                                                 8 neighbours is strong;
//   magnitude <  t_low                         -> discarded.
// Linking looks at the direct neighbours only, in a single pass, so a weak
// pixel joined to a strong edge through other weak pixels is discarded.
// Output frame: (W-2) x (H-2) one-bit edge flags, raster order.
//
// Interface: in_valid/in_mag, the W x H suppressed frame; t_low/t_high the
// two thresholds (compared with the unnormalised magnitudes); out_valid with
// out_edge one clock after the column that completes the window.
//
// The three memories, the 3x3 window and the two-threshold rule with the 8
// direct neighbours follow the design this implements. The threshold values
// are left to the user; treating a value equal to a threshold as weak is a
// choice of this implementation.
module edge_link_stage
  import canny_pkg::*;
#(
  parameter int W = 700,
  parameter int H = 744
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [MAG_W-1:0] in_mag,
  input  logic [MAG_W-1:0] t_low,
  input  logic [MAG_W-1:0] t_high,
  output logic             out_valid,
  output logic             out_edge
);

  localparam int K  = 3;
  localparam int CW = $clog2(W + 1);

  logic             col_valid;
  logic [MAG_W-1:0] col_data [K];
  logic [CW-1:0]    col_c;
  logic [MAG_W-1:0] win [K][K-1]; // columns 0 and 1; column 2 is col_data
  logic             is_strong [K][K];
  logic             any_strong_nb, centre_strong, centre_weak;

  line_buffer_bank #(.DW(MAG_W), .K(K), .W(W), .H(H)) u_supimg_mem (
    .clk, .rst, .in_valid, .in_data(in_mag),
    .col_valid, .col_data, .col_c, .col_r(),
    .rd_en_o(), .rd_addr_o(), .wr_addr_o()
  );

  always_ff @(posedge clk) begin
    if (col_valid) begin
      for (int i = 0; i < K; i++) begin
        win[i][0] <= win[i][1];
        win[i][1] <= col_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int j = 0; j < K - 1; j++) is_strong[i][j] = (win[i][j] > t_high);
      is_strong[i][K-1] = (col_data[i] > t_high);
    end
    any_strong_nb = is_strong[0][0] | is_strong[0][1] | is_strong[0][2] |
                    is_strong[1][0] |                is_strong[1][2] |
                    is_strong[2][0] | is_strong[2][1] | is_strong[2][2];
    centre_strong = is_strong[1][1];
    centre_weak   = (win[1][1] >= t_low) && !centre_strong;
  end

  always_ff @(posedge clk) begin
    if (col_valid) out_edge <= centre_strong || (centre_weak && any_strong_nb);
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= col_valid && (int'(col_c) >= K - 1);
  end

endmodule
