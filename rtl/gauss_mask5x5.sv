// gauss_mask5x5: the 5x5 Gaussian operator applied to one window per clock.
//
// Multiplies the 25 window pixels by the sigma = 1.4 kernel (weights 2..15,
// sum 159) and adds the products in two registered steps: five row sums,
// then their total. The result is the weighted sum itself; the division by
// 159 is not carried out, so the smoothed pixel is 16 bits wide (255*159 =
// 40545 at most), the width the gradient mask takes. Latency: 2 clocks from
// in_valid to out_valid, one result per clock.
//
// The kernel follows the design this implements; skipping the division by 159
// and the two-step adder pipeline are choices of this implementation.
module gauss_mask5x5
  import canny_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] win [5][5],
  output logic             out_valid,
  output logic [SMO_W-1:0] out_pix
);

  logic [SMO_W-1:0] row_sum [5];
  logic             row_valid;

  always_ff @(posedge clk) begin
    for (int i = 0; i < 5; i++) begin
      logic [SMO_W-1:0] acc;
      acc = '0;
      for (int j = 0; j < 5; j++) acc = acc + SMO_W'(GAUSS_K[i][j]) * SMO_W'(win[i][j]);
      if (in_valid) row_sum[i] <= acc;
    end
    if (row_valid) out_pix <= row_sum[0] + row_sum[1] + row_sum[2] + row_sum[3] + row_sum[4];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      row_valid <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      row_valid <= in_valid;
      out_valid <= row_valid;
    end
  end

endmodule
