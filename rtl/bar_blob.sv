// bar_blob: one bar of the bar visualization.
//
// A rectangle WIDTH columns wide whose bottom-left corner is (X, Y) and whose
// height is the `height` input grows upward from row Y. For the pixel at
// (hcount, vcount) the output is COLOR inside the rectangle and black outside,
// so several bars can be ORed together. Follows the design description
// (default colour blue); combinational.
module bar_blob
  import avs_pkg::*;
#(
  parameter int unsigned X     = 0,
  parameter int unsigned Y     = 242,
  parameter int unsigned WIDTH = 30,
  parameter rgb565_t     COLOR = RGB_BLUE
) (
  input  logic [9:0] hcount,   // column
  input  logic [9:0] vcount,   // row
  input  logic [9:0] height,
  output rgb565_t    pixel
);
  logic in_x, in_y;
  assign in_x  = (11'(hcount) >= 11'(X)) && (11'(hcount) < 11'(X + WIDTH));
  assign in_y  = (11'(vcount) <= 11'(Y)) && (11'(vcount) + 11'(height) > 11'(Y));
  assign pixel = (in_x && in_y) ? COLOR : RGB_BLACK;
endmodule
