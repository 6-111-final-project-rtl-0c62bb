// tick_100hz: one-clock enable pulse at 100 Hz for the ball physics.
//
// A counter divides the clock by DIVIDE (270,000 for 100 Hz from 27 MHz) and
// pulses `tick` for one clock each time it wraps. The 100 Hz rate follows the
// design description.
module tick_100hz #(
  parameter int unsigned DIVIDE = 270_000
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  localparam int unsigned CW = $clog2(DIVIDE);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (count == CW'(DIVIDE - 1)) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end
endmodule
