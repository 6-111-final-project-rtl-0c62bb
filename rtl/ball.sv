// ball: a filled disc of RADIUS pixels centred on (x, y).
//
// COLOR inside the disc (squared distance <= RADIUS^2), black outside.
// Follows the design description (white by default); combinational.
module ball
  import avs_pkg::*;
#(
  parameter int unsigned RADIUS = 5,
  parameter rgb565_t     COLOR  = RGB_WHITE
) (
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  output rgb565_t    pixel
);
  assign pixel = (dist2(hcount, vcount, x, y) <= 21'(RADIUS * RADIUS)) ? COLOR : RGB_BLACK;
endmodule
