// doer: decides where the visualizer writes into the frame buffer.
//
// To avoid writing where the video output is reading, writing follows the TV
// trace one line behind: on every row_done pulse (the trace has just finished
// a line) the row to write is set to vcount / 2 (the half-resolution row of
// the line just drawn), the column restarts at 0 and write enable is raised.
// The column then advances once per clock over the 360 visible columns, and
// write enable drops after column 359. This follows the design description.
// This implementation keeps write enable for columns 0..359 only, so the row
// never spills into the next row's first address.
//
// Timing: row/col/we are registered; row_done at edge t gives col 0 with
// we = 1 during the following cycle and col 359 during cycle t+360.
module doer (
  input  logic       clk,
  input  logic       rst,
  input  logic       row_done,
  input  logic [9:0] vcount,   // full-resolution line just drawn
  output logic       we,
  output logic [9:0] row,
  output logic [9:0] col
);
  localparam logic [9:0] LAST_COL = 10'd359;

  always_ff @(posedge clk) begin
    if (rst) begin
      we  <= 1'b0;
      row <= '0;
      col <= '0;
    end else if (row_done) begin
      row <= vcount >> 1;
      col <= '0;
      we  <= 1'b1;
    end else if (we) begin
      if (col == LAST_COL) we  <= 1'b0;
      else                 col <= col + 10'd1;
    end
  end
endmodule
