// canny_pkg: types and constants shared by the Canny edge detector.
//
// Pixel widths follow the port widths of the gradient and suppression
// processors: the smoothed pixel entering the gradient mask is 16 bits wide
// (the unnormalised 5x5 Gaussian sum), each Sobel gradient is a 19-bit two's
// complement value and the gradient magnitude |Gx|+|Gy| is carried in 20 bits.
// The Gaussian kernel is the sigma = 1.4 kernel whose weights sum to 159.
// The direction label uses the four classes 0, 45, 90 and 135 degrees.
//
// The kernel, the four direction classes and the widths follow the design
// this implements (the widths as printed on its module ports). Keeping the
// Gaussian sum unnormalised, the 8 fraction bits of the quotient and the label
// encoding (0, 1, 2, 3 for 0, 45, 90, 135 degrees) are choices of this
// implementation.
package canny_pkg;

  localparam int PIX_W  = 8;   // raw grey-level pixel
  localparam int SMO_W  = 16;  // smoothed pixel (sum of weights * pixel, max 255*159)
  localparam int GRAD_W = 19;  // signed Sobel gradient
  localparam int MAG_W  = 20;  // gradient magnitude |Gx| + |Gy|

  // Sum of the Gaussian weights; the smoothing stage leaves it in the pixel.
  localparam int GAUSS_SUM = 159;

  // 5x5 Gaussian kernel, sigma = 1.4, row-major.
  typedef int unsigned kern5_t [5][5];
  localparam kern5_t GAUSS_K = '{
    '{2,  4,  5,  4, 2},
    '{4,  9, 12,  9, 4},
    '{5, 12, 15, 12, 5},
    '{4,  9, 12,  9, 4},
    '{2,  4,  5,  4, 2}};

  // Gradient direction classes.
  typedef enum logic [1:0] {
    DIR_0   = 2'd0,  // horizontal gradient: compare west/east
    DIR_45  = 2'd1,  // positive diagonal: compare north-east/south-west
    DIR_90  = 2'd2,  // vertical gradient: compare north/south
    DIR_135 = 2'd3   // negative diagonal: compare north-west/south-east
  } theta_t;

  // Fixed-point fraction bits of the |Gy|/|Gx| quotient and the two
  // direction frontiers tan(22.5) and tan(67.5) in that format (x256).
  localparam int QFRAC      = 8;
  localparam int TAN22_5_Q  = 106;  // round(0.41421 * 256)
  localparam int TAN67_5_Q  = 618;  // round(2.41421 * 256)

endpackage
