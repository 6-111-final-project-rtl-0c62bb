// vis_address: frame-buffer address of a half-resolution pixel.
//
// The frame buffer is stored row by row, 360 words per row, so the address of
// (row, col) is row * 360 + col. The formula follows the design description.
// Purely combinational.
module vis_address
  import avs_pkg::*;
(
  input  logic [9:0]           row,   // 0..242
  input  logic [9:0]           col,   // 0..359
  output logic [FB_ADDR_W-1:0] addr
);
  logic [FB_ADDR_W-1:0] row_base;
  assign row_base = FB_ADDR_W'(row) * FB_ADDR_W'(SCREEN_W);
  assign addr     = row_base + FB_ADDR_W'(col);
endmodule
