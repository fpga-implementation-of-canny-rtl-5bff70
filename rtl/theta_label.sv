// theta_label: gradient direction labeling by the "frontier" method.
//
// Instead of taking an arctangent, the quotient q = |Gy|/|Gx| (fixed point,
// QFRAC fraction bits) is compared with the tangents of the two frontier
// angles, tan(22.5) and tan(67.5), precomputed as constants:
//   q <  tan(22.5)           -> 0 degrees   (horizontal gradient)
//   q >= tan(67.5)           -> 90 degrees  (vertical gradient, also Gx = 0)
//   otherwise                -> 45 degrees when Gx and Gy have the same sign,
//                               135 degrees when their signs differ.
// Gy is positive when the upper row is brighter, so a gradient with Gx > 0,
// Gy > 0 points up and to the right (north-east). Combinational.
//
// The frontier method follows the design this implements. The fixed-point
// format and telling 45 from 135 degrees by the gradient signs are choices of
// this implementation.
module theta_label
  import canny_pkg::*;
#(
  parameter int QW = 26
) (
  input  logic [QW-1:0] quo,
  input  logic          signs_differ,
  output theta_t        theta
);

  always_comb begin
    if (quo < QW'(TAN22_5_Q))       theta = DIR_0;
    else if (quo >= QW'(TAN67_5_Q)) theta = DIR_90;
    else if (signs_differ)          theta = DIR_135;
    else                            theta = DIR_45;
  end

endmodule
