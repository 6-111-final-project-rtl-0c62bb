// eq_bars: the eight equalizer bars as one YCrCb overlay.
//
// Eight ycrcb_blob bars, 50 pixels apart starting at column 200 and standing
// on picture line 320, one per bucket coefficient. The bar of the selected
// bucket is outlined. The outputs of all bars are ORed: outside the bars every
// blob gives zero, so the OR is the one bar that covers the pixel, or zero.
// Follows the design description; combinational.
module eq_bars
  import avs_pkg::*;
#(
  parameter int unsigned X0    = 200,
  parameter int unsigned PITCH = 50,
  parameter int unsigned Y     = 320
) (
  input  logic [2:0]                  selected,
  input  logic [NUM_BUCKETS-1:0][7:0] height,
  input  logic [9:0]                  hcount,
  input  logic [9:0]                  vcount,
  output ycrcb_t                      ycc
);
  ycrcb_t [NUM_BUCKETS-1:0] bar;

  for (genvar i = 0; i < NUM_BUCKETS; i++) begin : g_bar
    ycrcb_blob #(.X(X0 + PITCH * i), .Y(Y)) u_blob (
      .hcount, .vcount, .outline(selected == 3'(i)), .height_in(height[i]),
      .ycc(bar[i]));
  end

  always_comb begin
    ycc = '0;
    for (int i = 0; i < NUM_BUCKETS; i++) ycc = ycc | bar[i];
  end
endmodule
