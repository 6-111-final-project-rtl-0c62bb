// info_dist: per-bucket smoothing between the audio path and the visualizer.
//
// Buckets arrive one at a time (bkt_valid with bkt_index). Each new value is
// kept in a holding register for its bucket. On frame_done - the video output
// has just finished a whole frame - every output register is replaced by the
// average of its old value and the held value, (old + new) / 2. The outputs
// therefore change only between frames, so a picture is never drawn with
// half-old, half-new bucket values, and one-frame spikes are halved. All of
// this follows the design description (two banks of eight 16-bit registers).
// Reset clearing both banks is this implementation's choice.
//
// Timing: a value held before the frame_done clock edge is averaged in on
// that edge.
module info_dist
  import avs_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst,
  input  logic [15:0]                 bkt_mag,
  input  logic [2:0]                  bkt_index,
  input  logic                        bkt_valid,
  input  logic                        frame_done,
  output logic [NUM_BUCKETS-1:0][15:0] bucket     // smoothed bucket values
);
  logic [NUM_BUCKETS-1:0][15:0] latest;

  always_ff @(posedge clk) begin
    if (rst) begin
      latest <= '0;
      bucket <= '0;
    end else begin
      if (bkt_valid) latest[bkt_index] <= bkt_mag;
      if (frame_done) begin
        for (int i = 0; i < NUM_BUCKETS; i++) begin
          bucket[i] <= 16'((17'(bucket[i]) + 17'(latest[i])) >> 1);
        end
      end
    end
  end
endmodule
