// visualizer_layer: from bucket stream to frame-buffer writes.
//
// Bucket values (bkt_mag, bkt_index, bkt_valid) are smoothed per frame by
// info_dist. The doer follows the TV trace: after each row_done it sweeps the
// 360 columns of row vcount/2 with write enable high. For the doer's
// (row, col) the visualizer computes all four visualizations, vis_select
// picks one with `sel`, and vis_address turns (row, col) into the RAM
// address. So we, addr and rgb_data line up in the same cycle and can drive
// the frame buffer's write port directly. A 100 Hz tick (tick_100hz) drives
// the ball physics. The structure follows the design description and its
// visualizer-layer diagram.
module visualizer_layer
  import avs_pkg::*;
#(
  parameter int unsigned TICK_DIVIDE = 270_000   // 27 MHz / 100 Hz
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [15:0]          bkt_mag,
  input  logic [2:0]           bkt_index,
  input  logic                 bkt_valid,
  input  logic                 row_done,
  input  logic                 frame_done,
  input  logic [9:0]           vcount,
  input  logic [1:0]           sel,
  output logic                 we,
  output logic [FB_ADDR_W-1:0] addr,
  output rgb565_t              rgb_data,
  output logic [NUM_BUCKETS-1:0][15:0] bucket,       // smoothed buckets (for observation)
  output logic [NUM_BUCKETS-1:0]       ball_flying
);
  logic          tick;
  logic [9:0]    row, col;
  rgb565_t [3:0] vis;

  info_dist u_info (
    .clk, .rst, .bkt_mag, .bkt_index, .bkt_valid, .frame_done, .bucket);

  tick_100hz #(.DIVIDE(TICK_DIVIDE)) u_tick (.clk, .rst, .tick);

  doer u_doer (.clk, .rst, .row_done, .vcount, .we, .row, .col);

  visualizer u_vis (
    .clk, .rst, .tick, .bucket, .row, .col, .vis, .ball_flying);

  vis_select u_sel (.vis_in(vis), .sel, .vis_out(rgb_data));

  vis_address u_addr (.row, .col, .addr);
endmodule
