// visualizer: the four visualizations, all computed in parallel.
//
// For the pixel at (row, col) of the 360 x 243 frame it produces one RGB565
// value per visualization from the eight smoothed bucket values:
//   vis[0] bars: eight vertical bars (bar_blob) standing on the bottom row,
//          40 columns apart, ORed together on black;
//   vis[1] diagonal bars: eight 45-degree bars (diagonal_bar) 15 columns
//          apart on the bottom row, each with a ball (ball) that sits on the
//          bar tip and is thrown off when the bar gets tall (ball_physics),
//          all ORed together on black;
//   vis[2] radial: eight 45-degree sectors (radial_segment) around the screen
//          centre, radius = bucket value, ANDed together on white;
//   vis[3] intersecting circles: eight lens circles (circle_lens) arranged
//          as a diamond, ANDed together on white.
// The shapes, their combination (OR on black, AND on white), the bar spacing
// and the ball behaviour follow the design description. This implementation
// saturates each bucket to 255 before using it as a size, and chooses the
// colours and circle centres. The bar tip used as the ball anchor is
// (X + 3h/4, 242 - 3h/4), close to h/sqrt(2) along the 45-degree bar.
//
// Timing: the pixel outputs are combinational in row/col; only the ball
// positions are state (updated on `tick`, 100 Hz).
module visualizer
  import avs_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         tick,
  input  logic [NUM_BUCKETS-1:0][15:0] bucket,
  input  logic [9:0]                   row,
  input  logic [9:0]                   col,
  output rgb565_t [3:0]                vis,
  output logic [NUM_BUCKETS-1:0]       ball_flying
);
  localparam int unsigned BOTTOM = SCREEN_H - 1;   // 242

  // palette, bucket 0 (bass) to 7 (treble)
  localparam rgb565_t [7:0] PALETTE = {
    16'hF81F, 16'h801F, 16'h001F, 16'h07FF, 16'h07E0, 16'hFFE0, 16'hFC00, 16'hF800
  };
  // intersecting-circle centres: a diamond around the screen centre
  localparam int unsigned CIRC_X [8] = '{180, 150, 210, 120, 240, 150, 210, 180};
  localparam int unsigned CIRC_Y [8] = '{ 61,  91,  91, 121, 121, 151, 151, 181};
  localparam rgb565_t     CIRC_C [8] = '{RGB_RED, RGB_BLUE, RGB_BLUE, RGB_GREEN,
                                         RGB_GREEN, RGB_BLUE, RGB_BLUE, RGB_RED};

  logic [NUM_BUCKETS-1:0][9:0] size;
  rgb565_t [NUM_BUCKETS-1:0]   bar_px, diag_px, ball_px, rad_px, circ_px;

  for (genvar i = 0; i < NUM_BUCKETS; i++) begin : g_bucket
    assign size[i] = (bucket[i] > 16'd255) ? 10'd255 : 10'(bucket[i]);

    bar_blob #(.X(40 * (i + 1)), .Y(BOTTOM), .WIDTH(30), .COLOR(PALETTE[i])) u_bar (
      .hcount(col), .vcount(row), .height(size[i]), .pixel(bar_px[i]));

    diagonal_bar #(.X(15 * i), .Y(BOTTOM), .WIDTH(5), .COLOR(PALETTE[i])) u_diag (
      .hcount(col), .vcount(row), .height(size[i]), .pixel(diag_px[i]));

    logic [9:0] three_q, tip_x, tip_y, bx, by;
    assign three_q = (size[i] >> 1) + (size[i] >> 2);
    assign tip_x   = 10'(15 * i) + three_q;
    assign tip_y   = 10'(BOTTOM) - three_q;

    ball_physics u_phys (
      .clk, .rst, .tick, .anchor_x(tip_x), .anchor_y(tip_y), .height(size[i]),
      .x_out(bx), .y_out(by), .flying(ball_flying[i]));

    ball #(.RADIUS(5), .COLOR(RGB_WHITE)) u_ball (
      .x(bx), .y(by), .hcount(col), .vcount(row), .pixel(ball_px[i]));

    radial_segment #(.X(SCREEN_W / 2), .Y(SCREEN_H / 2), .SEGMENT(i), .COLOR(PALETTE[i])) u_rad (
      .hcount(col), .vcount(row), .radius(size[i]), .pixel(rad_px[i]));

    circle_lens #(.X(CIRC_X[i]), .Y(CIRC_Y[i]), .COLOR(CIRC_C[i])) u_circ (
      .hcount(col), .vcount(row), .radius(size[i]), .pixel(circ_px[i]));
  end

  always_comb begin
    vis[0] = RGB_BLACK;
    vis[1] = RGB_BLACK;
    vis[2] = RGB_WHITE;
    vis[3] = RGB_WHITE;
    for (int i = 0; i < NUM_BUCKETS; i++) begin
      vis[0] = vis[0] | bar_px[i];
      vis[1] = vis[1] | diag_px[i] | ball_px[i];
      vis[2] = vis[2] & rad_px[i];
      vis[3] = vis[3] & circ_px[i];
    end
  end
endmodule
