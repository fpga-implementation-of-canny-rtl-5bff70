// supimg_module: non-maximum suppression processor.
//
// Each clock in which calc_supimg is high, three gradient magnitudes of one
// column, one row apart, arrive on mod_rd_data1..3 (rows r, r+1, r+2) and
// form the right-hand column (mod02, mod12, mod22) of a 3x3 window; the six
// magnitudes of the two previous columns sit in registers (mod00/mod01,
// mod10/mod11, mod20/mod21) and shift left one column. theta_rd_data is the
// direction label of the pixel (r+1, c); it is held for one column so that it
// belongs to the window centre mod11.
//
// The centre is kept when it is at least as large as both neighbours along
// its gradient direction (west/east for 0 degrees, north-east/south-west for
// 45, north/south for 90, north-west/south-east for 135) and set to zero
// otherwise. start_store_supimg marks a column that completes a window (the
// third or later column of a row); the result of such a window is written out
// on supimg_wr_data with supimg_wr_en on the next clock.
//
// The port names and widths, and the window fed directly by the memory
// outputs, follow the suppression module of the design this implements. The
// supimg_wr_en output, keeping a centre equal to a neighbour, and the
// neighbour pairs for 45 and 135 degrees are choices of this implementation.
module supimg_module
  import canny_pkg::*;
(
  input  logic             clk,
  input  logic             reset,
  input  logic             calc_supimg,
  input  logic             start_store_supimg,
  input  logic [MAG_W-1:0] mod_rd_data1,
  input  logic [MAG_W-1:0] mod_rd_data2,
  input  logic [MAG_W-1:0] mod_rd_data3,
  input  theta_t           theta_rd_data,
  output logic             supimg_wr_en,
  output logic [MAG_W-1:0] supimg_wr_data
);

  logic [MAG_W-1:0] mod00, mod01, mod10, mod11, mod20, mod21;
  logic [MAG_W-1:0] mod02, mod12, mod22;
  logic [MAG_W-1:0] n_a, n_b;
  theta_t           theta_mid;

  assign mod02 = mod_rd_data1;
  assign mod12 = mod_rd_data2;
  assign mod22 = mod_rd_data3;

  always_ff @(posedge clk) begin
    if (calc_supimg) begin
      mod00 <= mod01;  mod01 <= mod02;
      mod10 <= mod11;  mod11 <= mod12;
      mod20 <= mod21;  mod21 <= mod22;
      theta_mid <= theta_rd_data;
    end
  end

  // Neighbours of the centre mod11 along the gradient direction.
  always_comb begin
    unique case (theta_mid)
      DIR_0:   begin n_a = mod10; n_b = mod12; end
      DIR_45:  begin n_a = mod02; n_b = mod20; end
      DIR_90:  begin n_a = mod01; n_b = mod21; end
      default: begin n_a = mod00; n_b = mod22; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (calc_supimg && start_store_supimg)
      supimg_wr_data <= (mod11 >= n_a && mod11 >= n_b) ? mod11 : '0;
  end

  always_ff @(posedge clk) begin
    if (reset) supimg_wr_en <= 1'b0;
    else       supimg_wr_en <= calc_supimg && start_store_supimg;
  end

endmodule
