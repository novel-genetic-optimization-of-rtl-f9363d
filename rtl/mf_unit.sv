// mf_unit: degree of membership of one 8-bit input in one trapezoidal
// membership function with corner points a0 <= a1 <= a2 <= a3.
//
// A triangle (b0, b1, b2) is the same unit driven with a1 = a2 = b1. The
// degree is found with the slope method: the slope of each flank,
// floor(255*256 / width), is derived from the corner points, and the degree
// on a flank is (distance from the foot * slope) >> 8, limited to 255. Left of
// a0 and right of a3 the degree is 0; between a1 and a2 it is 255. A flank of
// zero width (a0 = a1, or a2 = a3) is a vertical edge, so the left and right
// shoulder sets of a universe reach 255 at its ends.
//
// Interface: x and the four points in, mu out. Purely combinational; the
// caller registers the result. The trapezoid/triangle shapes, the 8-bit
// sizes and the use of slopes follow the design description; the fixed-point
// form of the slope (8 fraction bits, truncation, saturation) is this
// design's own choice.
module mf_unit
  import fuzzy_pkg::*;
(
  input  u8_t x,
  input  u8_t a0,
  input  u8_t a1,
  input  u8_t a2,
  input  u8_t a3,
  output u8_t mu
);

  localparam logic [15:0] SLOPE_NUM = 16'(int'(MU_MAX) << 8);

  logic [15:0] slope_up, slope_dn;
  logic [23:0] prod_up, prod_dn;
  logic [15:0] deg_up, deg_dn;

  always_comb begin
    // Slopes of the rising and the falling flank (unused when width is 0).
    slope_up = (a1 > a0) ? SLOPE_NUM / 16'(a1 - a0) : '0;
    slope_dn = (a3 > a2) ? SLOPE_NUM / 16'(a3 - a2) : '0;
    prod_up  = 24'(x - a0) * 24'(slope_up);
    prod_dn  = 24'(a3 - x) * 24'(slope_dn);
    deg_up   = 16'(prod_up >> 8);
    deg_dn   = 16'(prod_dn >> 8);

    if (x < a0 || x > a3)
      mu = '0;
    else if (x < a1)
      mu = (deg_up > 16'(MU_MAX)) ? MU_MAX : deg_up[7:0];
    else if (x <= a2)
      mu = MU_MAX;
    else
      mu = (deg_dn > 16'(MU_MAX)) ? MU_MAX : deg_dn[7:0];
  end

endmodule
