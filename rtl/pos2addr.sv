// pos2addr: read address of the frame buffer for the position of the TV trace.
//
// The picture is stored at half resolution in both directions, so the full
// resolution position (h_position 0..719, v_position 0..485) is halved and
// turned into an address with row * 360 + col. Follows the design
// description; combinational.
module pos2addr
  import avs_pkg::*;
(
  input  logic [9:0]           h_position,
  input  logic [9:0]           v_position,
  output logic [FB_ADDR_W-1:0] addr
);
  vis_address u_addr (
    .row ({1'b0, v_position[9:1]}),
    .col ({1'b0, h_position[9:1]}),
    .addr
  );
endmodule
