// ycrcb_blob: one equalizer bar, drawn directly in YCrCb.
//
// A bar WIDTH pixels wide standing on picture line Y at column X, with a
// height of height_in / 2 lines (the 8-bit coefficient gives up to 127
// lines). For the position (hcount, vcount) of the TV trace it returns the
// bar colour inside the bar and all zeros outside, so bars can be ORed
// together and a zero Y means "no bar here". When `outline` is set (the bar
// is the selected one) the two outermost pixels on every side are drawn
// with a bright Y. Shape, zero-outside convention and selection border follow
// the design description; the colours (neutral grey bar, near-white border)
// are this implementation's choice. Combinational.
module ycrcb_blob
  import avs_pkg::*;
#(
  parameter int unsigned X        = 0,
  parameter int unsigned Y        = 320,
  parameter int unsigned WIDTH    = 40,
  parameter logic [9:0]  Y_COLOR  = 10'd480,
  parameter logic [9:0]  CR_COLOR = 10'd512,
  parameter logic [9:0]  CB_COLOR = 10'd512,
  parameter logic [9:0]  Y_BRIGHT = 10'd940
) (
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic       outline,
  input  logic [7:0] height_in,
  output ycrcb_t     ycc
);
  logic [10:0] h, v, height;
  logic        in_bar, border;

  assign h      = 11'(hcount);
  assign v      = 11'(vcount);
  assign height = 11'(height_in >> 1);
  assign in_bar = (h >= 11'(X)) && (h < 11'(X + WIDTH)) &&
                  (v <= 11'(Y)) && (v + height > 11'(Y));
  assign border = (h < 11'(X + 2)) || (h + 11'd2 >= 11'(X + WIDTH)) ||
                  (v + 11'd2 > 11'(Y)) || (v + height < 11'(Y + 3));

  always_comb begin
    if (!in_bar)                ycc = '0;
    else if (outline && border) ycc = '{y: Y_BRIGHT, cr: CR_COLOR, cb: CB_COLOR};
    else                        ycc = '{y: Y_COLOR,  cr: CR_COLOR, cb: CB_COLOR};
  end
endmodule
