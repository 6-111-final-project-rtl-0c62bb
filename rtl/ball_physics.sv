// ball_physics: a ball that rides on a bar and is thrown off it.
//
// While attached, the ball sits on the anchor point (the tip of its bar) and
// follows it every clock. When the bar height rises above THRESHOLD the bar
// lets go: the ball leaves with velocity (LAUNCH_VX, -LAUNCH_VY), up and to
// the right along the diagonal bar. From then on, on every 100 Hz tick, the
// y velocity grows by GRAVITY (screen y points down) and both coordinates
// move by their velocities. When the ball leaves the screen at the bottom or
// the right it is attached to its bar again. The attach / let-go behaviour,
// the 100 Hz update and "velocity from acceleration, position from velocity"
// follow the design description; the threshold, launch speed and gravity are
// this implementation's choices.
//
// Positions are kept as signed 12-bit numbers; x_out/y_out give 1023 (off
// screen) while the ball is above the top edge.
module ball_physics
  import avs_pkg::*;
#(
  parameter int unsigned THRESHOLD = 192,
  parameter int          LAUNCH_VX = 3,
  parameter int          LAUNCH_VY = 8,
  parameter int          GRAVITY   = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,       // 100 Hz update enable
  input  logic [9:0] anchor_x,   // bar tip
  input  logic [9:0] anchor_y,
  input  logic [9:0] height,     // bar height
  output logic [9:0] x_out,
  output logic [9:0] y_out,
  output logic       flying      // 1 while released
);
  // a ball this far past the bottom or right edge is gone
  localparam logic signed [11:0] OFF_Y = 12'(SCREEN_H + 8);
  localparam logic signed [11:0] OFF_X = 12'(SCREEN_W + 8);

  logic signed [11:0] x, y, vx, vy;

  always_ff @(posedge clk) begin
    if (rst) begin
      x      <= '0;
      y      <= '0;
      vx     <= '0;
      vy     <= '0;
      flying <= 1'b0;
    end else if (!flying) begin
      x <= $signed({2'b00, anchor_x});
      y <= $signed({2'b00, anchor_y});
      if (height > 10'(THRESHOLD)) begin
        flying <= 1'b1;
        vx     <= 12'(LAUNCH_VX);
        vy     <= -12'(LAUNCH_VY);
      end
    end else if (tick) begin
      if (y > OFF_Y || x > OFF_X) begin
        flying <= 1'b0;
      end else begin
        x  <= x + vx;
        y  <= y + vy;
        vy <= vy + 12'(GRAVITY);
      end
    end
  end

  assign x_out = (x < 0) ? 10'd1023 : x[9:0];
  assign y_out = (y < 0) ? 10'd1023 : y[9:0];
endmodule
