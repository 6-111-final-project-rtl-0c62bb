// recorder: control of the audio front end around the AC97 codec and the FFT.
//
// The codec raises `ready` once per 48 kHz sample. A rising edge of ready is
// a new audio frame: the recorder then (a) advances the 750 Hz test tone,
// (b) updates the headphone sample to_ac97_data - the test tone while
// `playback` is high (enter button released), the microphone sample looped
// back while it is low, since the equalized path through the inverse FFT was
// never completed - and (c) holds the microphone sample on fft_xn_re for the
// external 1024-point FFT, whose clock enable is ready itself (fft_ce), so
// the FFT takes exactly one sample per audio frame. The FFT's output stream
// comes back on xk_* and is reduced to 8 buckets by the bucketizer.
// All of this follows the design description; the FFT core itself is not
// part of this RTL. This implementation feeds the FFT the microphone sample
// (the description's intent) and registers it on each new frame.
//
// Timing: to_ac97_data and fft_xn_re change one clock after the rising edge
// of ready. The FFT sees ready high for as long as the codec holds it, which
// is why the bucketizer counts each output bin only once.
module recorder (
  input  logic               clk,
  input  logic               rst,
  input  logic               playback,        // 1: test tone, 0: loop-back
  input  logic               ready,           // AC97 sample strobe, 48 kHz
  input  logic        [7:0]  from_ac97_data,  // microphone sample
  output logic        [7:0]  to_ac97_data,    // headphone sample
  // external FFT
  output logic        [7:0]  fft_xn_re,       // FFT real input (imag = 0)
  output logic               fft_ce,          // FFT clock enable
  input  logic               fft_dv,
  input  logic signed [18:0] xk_re,
  input  logic signed [18:0] xk_im,
  input  logic        [9:0]  xk_index,
  // buckets
  output logic        [16:0] bkt_mag,
  output logic        [2:0]  bkt_index,
  output logic               bkt_valid
);
  logic old_ready;
  logic new_frame;

  always_ff @(posedge clk) begin
    if (rst) old_ready <= 1'b0;
    else     old_ready <= ready;
  end
  assign new_frame = ready && !old_ready;

  logic signed [19:0] tone;
  tone_750hz u_tone (.clk, .rst, .step(new_frame), .tone);

  // The tone register updates on the same edge as new_frame is seen, so the
  // headphone sample takes the tone value of the previous frame.
  always_ff @(posedge clk) begin
    if (rst) begin
      to_ac97_data <= '0;
      fft_xn_re    <= '0;
    end else if (new_frame) begin
      to_ac97_data <= playback ? tone[19:12] : from_ac97_data;
      fft_xn_re    <= from_ac97_data;
    end
  end

  assign fft_ce = ready;

  bucketizer u_bucketizer (
    .clk, .rst, .dv(fft_dv), .xk_re, .xk_im, .xk_index,
    .bkt_mag, .bkt_index, .bkt_valid
  );
endmodule
