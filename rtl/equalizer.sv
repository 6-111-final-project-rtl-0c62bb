// equalizer: keyboard-controlled equalizer with an on-screen overlay.
//
// Keeps two banks of eight 8-bit coefficients, one per frequency bucket: the
// temporary bank the user edits and the output bank the audio path uses.
// While `enable` is high, one-clock command pulses act on the temporary bank:
// left/right move the selected bucket (wrapping 7 <-> 0), up/down add or
// subtract STEP from the selected coefficient, saturating at 255 and at
// MIN_COEFF (so a bar cannot wrap below zero), and enter copies the whole
// temporary bank to the output bank. At reset all coefficients are 255.
// `coeff` is the output coefficient of bucket coeff_ind, for the audio
// multiplier; `coeffs` is the whole output bank.
//
// Video: while enabled, the eight bars (eq_bars, heights = temporary bank,
// selected bar outlined) are laid over the incoming YCrCb picture: where a
// bar is (its Y is non-zero) the bar is shown, elsewhere the picture passes
// through. When disabled the picture passes through untouched.
// Everything above follows the design description; the command priority
// (enter, left, right, up, down) and MIN_COEFF = 1 are this implementation's
// choices. The overlay is combinational; the coefficient banks are registers.
module equalizer
  import avs_pkg::*;
#(
  parameter int unsigned STEP      = 32,
  parameter int unsigned MIN_COEFF = 1
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        enable,
  input  logic                        left,
  input  logic                        right,
  input  logic                        up,
  input  logic                        down,
  input  logic                        enter,
  input  ycrcb_t                      ycc_in,
  input  logic [9:0]                  h_position,
  input  logic [9:0]                  v_position,
  input  logic [2:0]                  coeff_ind,
  output ycrcb_t                      ycc_out,
  output logic [7:0]                  coeff,
  output logic [NUM_BUCKETS-1:0][7:0] coeffs,
  output logic [2:0]                  bucket      // selected bucket
);
  logic [NUM_BUCKETS-1:0][7:0] temp;
  logic [8:0]                  raised;
  ycrcb_t                      bars;

  assign raised = 9'(temp[bucket]) + 9'(STEP);

  always_ff @(posedge clk) begin
    if (rst) begin
      coeffs <= '1;
      temp   <= '1;
      bucket <= '0;
    end else if (enable) begin
      if (enter)      coeffs <= temp;
      else if (left)  bucket <= bucket - 3'd1;
      else if (right) bucket <= bucket + 3'd1;
      else if (up)    temp[bucket] <= (raised > 9'd255) ? 8'd255 : raised[7:0];
      else if (down)  temp[bucket] <= (temp[bucket] > 8'(STEP + MIN_COEFF - 1))
                                      ? temp[bucket] - 8'(STEP) : 8'(MIN_COEFF);
    end
  end

  assign coeff = coeffs[coeff_ind];

  eq_bars u_bars (
    .selected(bucket), .height(temp), .hcount(h_position), .vcount(v_position),
    .ycc(bars));

  assign ycc_out = (enable && bars.y != 10'd0) ? bars : ycc_in;
endmodule
