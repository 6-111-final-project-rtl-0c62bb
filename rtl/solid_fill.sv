// solid_fill: frame-buffer test writer that paints one solid colour.
//
// Writes the colour chosen by three switches into the frame buffer one
// address behind the video read address, so it always writes where the
// picture was just read. Each switch fills one colour field completely
// (sw[2] red, sw[1] green, sw[0] blue), giving eight test colours. This is
// the description's first RAM-writing method, used to test colours; the
// one-address lag and the switch mapping follow the description, the rest is
// this implementation's. Registered: we/waddr/wdata change one clock after
// raddr and sw.
module solid_fill
  import avs_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2:0]           sw,
  input  logic [FB_ADDR_W-1:0] raddr,
  output logic                 we,
  output logic [FB_ADDR_W-1:0] waddr,
  output rgb565_t              wdata
);
  always_ff @(posedge clk) begin
    if (rst) begin
      we    <= 1'b0;
      waddr <= '0;
      wdata <= RGB_BLACK;
    end else begin
      we    <= 1'b1;
      waddr <= (raddr == '0) ? FB_ADDR_W'(FB_DEPTH - 1) : raddr - 1'b1;
      wdata <= {{5{sw[2]}}, {6{sw[1]}}, {5{sw[0]}}};
    end
  end
endmodule
