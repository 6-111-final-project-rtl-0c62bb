// video_mem: the frame buffer, a simple dual-port block RAM.
//
// DEPTH words of WIDTH bits: 360 x 243 = 87,480 words of RGB565 by default,
// exactly one half-resolution picture. Port A only writes (the visualizer),
// port B only reads (the video output). Both ports use the same clock; the
// read data is registered, so rdata shows the word at raddr one clock after
// raddr is presented. A read and a write of the same address in one cycle
// return the old word. The write-only/read-only split and the size follow
// the design description; the one-cycle read latency is this implementation's
// choice (block RAM style). Contents are not reset.
module video_mem
  import avs_pkg::*;
#(
  parameter int unsigned DEPTH  = FB_DEPTH,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned ADDR_W = FB_ADDR_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [WIDTH-1:0]  wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [WIDTH-1:0]  rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < ADDR_W'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= (raddr < ADDR_W'(DEPTH)) ? mem[raddr] : '0;
  end
endmodule
