// mult_m_idx: the 3x3 gradient mask (Sobel operator), combinational.
//
// Takes the nine pixels of the 3x3 window, idx00 (top left) to idx22 (bottom
// right), with idx02, idx12 and idx22 the column that has just arrived from
// the memories, and returns the x- and y-direction gradients:
//   idxx = (idx02 + 2*idx12 + idx22) - (idx00 + 2*idx10 + idx20)
//   idyy = (idx00 + 2*idx01 + idx02) - (idx20 + 2*idx21 + idx22)
// Pixels are the 16-bit smoothed values, so each gradient spans +-4*65535
// and is returned as a 19-bit two's complement number. The weights 1 and 2
// are wired shifts, so the mask needs adders only. The port names and widths
// are those of the gradient mask symbol of the design.
//
// The window names, the port widths and the Sobel weights follow the design
// this implements. The centre pixel idx11 is part of the window interface but
// has weight 0 in both masks, so it is unused (a lint warning that stands).
module mult_m_idx
  import canny_pkg::*;
(
  input  logic [SMO_W-1:0]         idx00, idx01, idx02,
  input  logic [SMO_W-1:0]         idx10, idx11, idx12,
  input  logic [SMO_W-1:0]         idx20, idx21, idx22,
  output logic signed [GRAD_W-1:0] idxx,
  output logic signed [GRAD_W-1:0] idyy
);

  logic [GRAD_W-1:0] right, left, top, bottom;

  always_comb begin
    right  = GRAD_W'(idx02) + (GRAD_W'(idx12) << 1) + GRAD_W'(idx22);
    left   = GRAD_W'(idx00) + (GRAD_W'(idx10) << 1) + GRAD_W'(idx20);
    top    = GRAD_W'(idx00) + (GRAD_W'(idx01) << 1) + GRAD_W'(idx02);
    bottom = GRAD_W'(idx20) + (GRAD_W'(idx21) << 1) + GRAD_W'(idx22);
    idxx   = signed'(right - left);
    idyy   = signed'(top - bottom);
  end

endmodule
