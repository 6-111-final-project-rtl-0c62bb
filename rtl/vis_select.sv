// vis_select: chooses which of the four visualizations is written to RAM.
//
// A 4:1 multiplexer of RGB565 pixels controlled by two selection bits
// (0 bars, 1 diagonal bars with balls, 2 radial, 3 intersecting circles).
// Follows the design description; combinational.
module vis_select
  import avs_pkg::*;
(
  input  rgb565_t [3:0] vis_in,
  input  logic    [1:0] sel,
  output rgb565_t       vis_out
);
  assign vis_out = vis_in[sel];
endmodule
