// rgb2ycrcb: RGB565 pixel to 10-bit Y, Cr, Cb for the video encoder.
//
// The 5/6/5-bit fields are widened to 8 bits by shifting left (3, 2 and 3
// places). The BT.601 conversion is done with integer constants and shifts
// instead of fractions:
//   Y  = (306 R + 601 G + 117 B) >> 10                 (0.299, 0.587, 0.114)
//   Cr = ((720 R - 720 Y) >> 10) + 128                  (0.713 (R - Y))
//   Cb = ((579 B - 579 Y) >> 10) + 128                  (0.565 (B - Y))
// and each 8-bit result is shifted left by 2 to fill the 10-bit port. The
// offset of 128 keeps Cr and Cb positive. These formulas follow the design
// description; the Cb formula uses B - Y, as the approximated BT.601 form
// states. Shifts of negative differences round toward minus infinity, and the
// results are clamped to 0..255 before widening (never reached for in-range
// inputs). Combinational.
module rgb2ycrcb
  import avs_pkg::*;
(
  input  rgb565_t pixel,
  output ycrcb_t  ycc
);
  logic [7:0]         r, g, b, y8;
  logic [19:0]        ysum;
  logic signed [19:0] cr_t, cb_t;
  logic signed [11:0] cr_s, cb_s;

  function automatic logic [7:0] clamp8(input logic signed [11:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  always_comb begin
    r    = {pixel[15:11], 3'b000};
    g    = {pixel[10:5],  2'b00};
    b    = {pixel[4:0],   3'b000};
    ysum = 20'd306 * 20'(r) + 20'd601 * 20'(g) + 20'd117 * 20'(b);
    y8   = ysum[17:10];
    cr_t = 20'sd720 * ($signed({12'd0, r}) - $signed({12'd0, y8}));
    cb_t = 20'sd579 * ($signed({12'd0, b}) - $signed({12'd0, y8}));
    cr_s = 12'(cr_t >>> 10) + 12'sd128;
    cb_s = 12'(cb_t >>> 10) + 12'sd128;
    ycc.y  = {y8, 2'b00};
    ycc.cr = {clamp8(cr_s), 2'b00};
    ycc.cb = {clamp8(cb_s), 2'b00};
  end
endmodule
