// eq_multiplier: applies the equalizer gain of each frequency bin's bucket.
//
// Each FFT output bin is reduced to the top 8 bits of its real and imaginary
// parts (zero when dv is low) and multiplied by the 8-bit equalizer
// coefficient of its bucket. The bucket number, xk_index[9:7], is sent to the
// equalizer as mul_index, which answers combinationally with coeff. The
// products go to the inverse FFT together with ifft_enable, which is high
// when the registered products are valid. The 8-bit truncation, the index
// bits [9:7], the per-bucket coefficient and the enable handshake follow the
// design description.
//
// This implementation's choices: the coefficient is an unsigned gain
// (0..255, the equalizer's range), so the product of a signed 8-bit value and
// an unsigned 8-bit value is a signed 17-bit number, sign-extended to the
// 18-bit output whose bits [17:10] the IFFT takes. Latency is one clock.
module eq_multiplier (
  input  logic               clk,
  input  logic               rst,
  input  logic               dv,
  input  logic signed [18:0] xk_re,
  input  logic signed [18:0] xk_im,
  input  logic        [9:0]  xk_index,
  input  logic        [7:0]  coeff,       // gain for bucket mul_index
  output logic        [2:0]  mul_index,   // bucket of the current bin
  output logic signed [17:0] mul_re,
  output logic signed [17:0] mul_im,
  output logic               ifft_enable
);
  logic signed [7:0] re8, im8;
  logic signed [8:0] gain;

  assign re8       = dv ? xk_re[18:11] : 8'sd0;
  assign im8       = dv ? xk_im[18:11] : 8'sd0;
  assign gain      = $signed({1'b0, coeff});
  assign mul_index = xk_index[9:7];

  logic signed [17:0] prod_re, prod_im;
  assign prod_re = re8 * gain;
  assign prod_im = im8 * gain;

  always_ff @(posedge clk) begin
    if (rst) begin
      mul_re      <= '0;
      mul_im      <= '0;
      ifft_enable <= 1'b0;
    end else begin
      mul_re      <= prod_re;
      mul_im      <= prod_im;
      ifft_enable <= dv;
    end
  end
endmodule
