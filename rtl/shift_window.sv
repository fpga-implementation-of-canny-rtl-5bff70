// shift_window: K x K moving-window register.
//
// Each time shift is high the window moves one column to the right across
// the frame: every register takes the value of its right-hand neighbour
// (pixels shift left) and the new column col_in enters the last column, as in
// the mask shift diagrams of the smoothing and gradient stages. win[i][j] is
// row i (0 = top) and column j (0 = oldest, K-1 = newest) of the window. The
// window is not reset: its contents are only used once K columns of the
// current row have entered, which the owning stage tracks.
//
// The left-shifting window fed in its last column follows the design this
// implements; making it a separate module is a choice of this implementation.
module shift_window #(
  parameter int DW = 8,
  parameter int K  = 5
) (
  input  logic          clk,
  input  logic          shift,
  input  logic [DW-1:0] col_in [K],
  output logic [DW-1:0] win    [K][K]
);

  always_ff @(posedge clk) begin
    if (shift) begin
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) win[i][j] <= win[i][j+1];
        win[i][K-1] <= col_in[i];
      end
    end
  end

endmodule
