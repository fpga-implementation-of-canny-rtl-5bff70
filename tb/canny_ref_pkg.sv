// canny_ref_pkg: software reference model of the Canny edge detector, used by
// the testbenches to work out expected outputs independently of the RTL.
//
// Frames are flat int arrays in raster order. Each function returns the
// frame of its stage, smaller by the border the stage's window loses:
//   gauss_ref  5x5 weighted sum, weights of the sigma 1.4 kernel (sum 159)
//   sobel_ref  Gx, Gy (3x3 Sobel) and |Gx|+|Gy|
//   theta_ref  direction class 0..3 (0, 45, 90, 135 degrees) from the
//              frontier comparisons 256|Gy| < 106|Gx| and 256|Gy| >= 618|Gx|,
//              written as products so that no division is involved
//   nms_ref    keep a magnitude that is >= both neighbours along its direction
//   link_ref   strong (> t_high) pixels, and weak (t_low..t_high) pixels with
//              a strong 8-neighbour
//
// The algorithm (kernel, Sobel, frontier labeling, suppression, linking) is the
// one the RTL follows; the software formulation is this model's own.
package canny_ref_pkg;

  typedef int frame_t[];

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic frame_t gauss_ref(const ref frame_t img, input int w, input int h);
    int k[5][5] = '{'{2,4,5,4,2}, '{4,9,12,9,4}, '{5,12,15,12,5}, '{4,9,12,9,4}, '{2,4,5,4,2}};
    frame_t o = new[(w-4)*(h-4)];
    for (int r = 0; r < h-4; r++)
      for (int c = 0; c < w-4; c++) begin
        int s = 0;
        for (int i = 0; i < 5; i++)
          for (int j = 0; j < 5; j++) s += k[i][j] * img[(r+i)*w + c+j];
        o[r*(w-4)+c] = s;
      end
    return o;
  endfunction

  function automatic void sobel_ref(const ref frame_t img, input int w, input int h,
                                    ref frame_t gx, ref frame_t gy, ref frame_t mag);
    gx = new[(w-2)*(h-2)]; gy = new[(w-2)*(h-2)]; mag = new[(w-2)*(h-2)];
    for (int r = 0; r < h-2; r++)
      for (int c = 0; c < w-2; c++) begin
        int p[3][3];
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) p[i][j] = img[(r+i)*w + c+j];
        gx[r*(w-2)+c]  = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
        gy[r*(w-2)+c]  = (p[0][0] + 2*p[0][1] + p[0][2]) - (p[2][0] + 2*p[2][1] + p[2][2]);
        mag[r*(w-2)+c] = iabs(gx[r*(w-2)+c]) + iabs(gy[r*(w-2)+c]);
      end
  endfunction

  function automatic int theta_ref(int gx, int gy);
    longint ax = iabs(gx), ay = iabs(gy);
    if (256*ay < 106*ax)  return 0;
    if (256*ay >= 618*ax) return 2;
    return ((gx < 0) != (gy < 0)) ? 3 : 1;
  endfunction

  function automatic frame_t nms_ref(const ref frame_t mag, const ref frame_t th,
                                     input int w, input int h);
    frame_t o = new[(w-2)*(h-2)];
    for (int r = 1; r < h-1; r++)
      for (int c = 1; c < w-1; c++) begin
        int m = mag[r*w+c], a, b;
        case (th[r*w+c])
          0: begin a = mag[r*w+c-1];     b = mag[r*w+c+1];     end
          1: begin a = mag[(r-1)*w+c+1]; b = mag[(r+1)*w+c-1]; end
          2: begin a = mag[(r-1)*w+c];   b = mag[(r+1)*w+c];   end
          default: begin a = mag[(r-1)*w+c-1]; b = mag[(r+1)*w+c+1]; end
        endcase
        o[(r-1)*(w-2)+c-1] = (m >= a && m >= b) ? m : 0;
      end
    return o;
  endfunction

  function automatic frame_t link_ref(const ref frame_t m, input int w, input int h,
                                      input int tl, input int th);
    frame_t o = new[(w-2)*(h-2)];
    for (int r = 1; r < h-1; r++)
      for (int c = 1; c < w-1; c++) begin
        int v = m[r*w+c];
        bit nb = 0;
        for (int i = -1; i <= 1; i++)
          for (int j = -1; j <= 1; j++)
            if ((i != 0 || j != 0) && m[(r+i)*w+c+j] > th) nb = 1;
        o[(r-1)*(w-2)+c-1] = (v > th) || (v >= tl && nb);
      end
    return o;
  endfunction

endpackage
