// circle_lens: one circle of the intersecting-circles visualization.
//
// A circle of radius `radius` around (X, Y) drawn as a lens: pixels on the
// border ring (squared distance between (r-1)^2 and (r+1)^2) get COLOR,
// pixels inside get a lighter COLOR (COLOR ORed with 0x7BEF, which sets the
// lower bits of each of the R, G and B fields), and pixels outside are white.
// ANDing several circles makes overlaps look like stacked lenses. Follows the
// design description; where it speaks of "ANDed with 0111101111101111" and of
// a lighter colour, this implementation ORs, which is what makes the colour
// lighter. Combinational.
module circle_lens
  import avs_pkg::*;
#(
  parameter int unsigned X     = 180,
  parameter int unsigned Y     = 121,
  parameter rgb565_t     COLOR = RGB_BLUE
) (
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic [9:0] radius,
  output rgb565_t    pixel
);
  localparam rgb565_t LIGHTEN = 16'b01111_011111_01111;

  logic [20:0] d2, inner2, outer2;
  logic [10:0] r_in, r_out;

  assign r_in   = (radius == 0) ? 11'd0 : 11'(radius) - 11'd1;
  assign r_out  = 11'(radius) + 11'd1;
  assign inner2 = 21'(r_in) * 21'(r_in);
  assign outer2 = 21'(r_out) * 21'(r_out);
  assign d2     = dist2(hcount, vcount, 10'(X), 10'(Y));

  always_comb begin
    if (d2 < inner2)       pixel = COLOR | LIGHTEN;
    else if (d2 <= outer2) pixel = COLOR;
    else                   pixel = RGB_WHITE;
  end
endmodule
