// diagonal_bar: one bar of the diagonal bar visualization.
//
// The bar is a thick piece of the 45-degree line hcount + vcount = X + Y
// (pixels whose h + v is within WIDTH of X + Y) cut to the disc of radius
// `height` around (X, Y). With (X, Y) on the bottom row only the half above
// the bottom edge is on screen, so it reads as a bar leaning to the right.
// Output is COLOR on the bar and black elsewhere. Follows the design
// description; combinational.
module diagonal_bar
  import avs_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 242,
  parameter int unsigned WIDTH = 5,
  parameter rgb565_t     COLOR = RGB_BLUE
) (
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic [9:0] height,
  output rgb565_t    pixel
);
  logic [11:0] diag;
  logic        near_line, in_disc;

  assign diag      = 12'(hcount) + 12'(vcount);
  assign near_line = (diag <= 12'(X + Y + WIDTH)) && (diag + 12'(WIDTH) >= 12'(X + Y));
  assign in_disc   = dist2(hcount, vcount, 10'(X), 10'(Y)) <= 21'(20'(height) * 20'(height));
  assign pixel     = (near_line && in_disc) ? COLOR : RGB_BLACK;
endmodule
