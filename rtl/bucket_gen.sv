// bucket_gen: test source of bucket values for the visualizer.
//
// Stands in for the audio path: every clock it presents the next bucket
// (index 0..7 in turn) with a magnitude taken from a 16-entry pattern at
// position (offset + index + 1) mod 16. When `advance` is high the offset
// steps by one after bucket 7, so the bar heights walk through the pattern
// and the picture moves periodically through small and large sizes; when it
// is low the picture stands still. A periodic, random-looking test pattern
// that exercises the whole size range follows the design description; the
// pattern values and their use are this implementation's.
module bucket_gen
  import avs_pkg::*;
#(
  parameter logic [7:0] PATTERN [16] = '{ 12, 250, 96, 40, 170, 210, 24, 130,
                                           0, 230, 150, 80, 255, 60, 190, 110 }
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        advance,
  output logic [2:0]  bkt_index,
  output logic [16:0] bkt_mag,
  output logic        bkt_valid
);
  logic [3:0] offset;
  logic [2:0] next_index;
  logic [3:0] pick;

  assign next_index = bkt_index + 3'd1;
  assign pick       = offset + 4'(next_index) + 4'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      bkt_index <= '0;
      bkt_mag   <= '0;
      bkt_valid <= 1'b0;
      offset    <= '0;
    end else begin
      bkt_index <= next_index;
      bkt_mag   <= 17'(PATTERN[pick]);
      bkt_valid <= 1'b1;
      if (next_index == 3'd7 && advance) offset <= offset + 4'd1;
    end
  end
endmodule
