// avs_pkg: shared types and constants of the music visualizer.
//
// The frame buffer holds the picture at half the NTSC resolution in both
// directions: 360 columns by 243 rows of 16-bit RGB565 pixels. The audio path
// splits each 1024-bin spectrum into 8 buckets of 128 bins. The video path
// carries 10-bit Y, Cr and Cb components (CCIR-656, 10-bit port).
package avs_pkg;

  // Frame buffer geometry (half resolution of the 720 x 486 active picture).
  localparam int unsigned SCREEN_W  = 360;
  localparam int unsigned SCREEN_H  = 243;
  localparam int unsigned FB_DEPTH  = SCREEN_W * SCREEN_H;  // 87,480 words
  localparam int unsigned FB_ADDR_W = 17;

  // Audio spectrum
  localparam int unsigned NUM_BUCKETS = 8;
  localparam int unsigned FFT_POINTS  = 1024;

  // 16-bit colour, 5 bits red, 6 bits green, 5 bits blue (red in the MSBs)
  typedef logic [15:0] rgb565_t;

  localparam rgb565_t RGB_BLACK = 16'h0000;
  localparam rgb565_t RGB_WHITE = 16'hFFFF;
  localparam rgb565_t RGB_RED   = 16'hF800;
  localparam rgb565_t RGB_GREEN = 16'h07E0;
  localparam rgb565_t RGB_BLUE  = 16'h001F;

  // One 10-bit YCrCb sample triple
  typedef struct packed {
    logic [9:0] y;
    logic [9:0] cr;
    logic [9:0] cb;
  } ycrcb_t;

  // Squared distance of (h,v) from (cx,cy), for the circle-based shapes.
  function automatic logic [20:0] dist2(input logic [9:0] h, input logic [9:0] v,
                                        input logic [9:0] cx, input logic [9:0] cy);
    logic signed [21:0] dx, dy, sum;
    dx  = $signed({12'd0, h}) - $signed({12'd0, cx});
    dy  = $signed({12'd0, v}) - $signed({12'd0, cy});
    sum = dx * dx + dy * dy;
    return sum[20:0];
  endfunction

endpackage
