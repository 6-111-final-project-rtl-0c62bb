// radial_segment: one 45-degree sector of the radial visualization.
//
// The screen centre (X, Y) is the origin; sector SEGMENT covers the angles
// 45*SEGMENT .. 45*(SEGMENT+1) degrees, counted counter-clockwise from the
// positive horizontal axis (screen rows grow downward, so "up" is -v). A
// pixel inside the sector and within `radius` of the centre gets COLOR,
// every other pixel white, so the eight sectors can be ANDed together.
// The radius check, the angle check and the white background follow the
// design description; the sector numbering is this implementation's choice.
// Combinational.
module radial_segment
  import avs_pkg::*;
#(
  parameter int unsigned X       = 180,
  parameter int unsigned Y       = 121,
  parameter int unsigned SEGMENT = 0,
  parameter rgb565_t     COLOR   = RGB_BLUE
) (
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  input  logic [9:0] radius,
  output rgb565_t    pixel
);
  logic signed [11:0] ex, ey;   // offset from the centre, y up
  logic signed [11:0] ax, ay;   // absolute values
  logic               in_sector, in_disc;

  assign ex = $signed({2'b00, hcount}) - $signed(12'(X));
  assign ey = $signed(12'(Y)) - $signed({2'b00, vcount});
  assign ax = (ex < 0) ? -ex : ex;
  assign ay = (ey < 0) ? -ey : ey;

  always_comb begin
    unique case (SEGMENT % 8)
      0: in_sector = (ex >= 0) && (ey >= 0) && (ax >= ay);
      1: in_sector = (ex >= 0) && (ey >= 0) && (ay >= ax);
      2: in_sector = (ex <= 0) && (ey >= 0) && (ay >= ax);
      3: in_sector = (ex <= 0) && (ey >= 0) && (ax >= ay);
      4: in_sector = (ex <= 0) && (ey <= 0) && (ax >= ay);
      5: in_sector = (ex <= 0) && (ey <= 0) && (ay >= ax);
      6: in_sector = (ex >= 0) && (ey <= 0) && (ay >= ax);
      default: in_sector = (ex >= 0) && (ey <= 0) && (ax >= ay);
    endcase
  end

  assign in_disc = dist2(hcount, vcount, 10'(X), 10'(Y)) <= 21'(20'(radius) * 20'(radius));
  assign pixel   = (in_sector && in_disc) ? COLOR : RGB_WHITE;
endmodule
