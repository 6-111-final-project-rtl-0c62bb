// music_visualizer: audio visualization system, top level.
//
// Audio comes in from the AC97 codec as 8-bit samples with a 48 kHz ready
// strobe and goes out to the TV as a CCIR-656 stream for the ADV7194 encoder.
//
//   audio:  recorder - loops the microphone (or a 750 Hz test tone) back to
//           the headphones, feeds the microphone samples to an external
//           1024-point FFT and turns its output into 8 buckets
//           (bucketizer). eq_multiplier scales the FFT bins by the
//           equalizer gains for an external inverse FFT.
//   visual: visualizer_layer - smooths the buckets once per frame, draws one
//           of four visualizations (sw[1:0]) one picture row at a time,
//           following the TV trace, into the frame buffer (video_mem,
//           360 x 243 RGB565).
//   video:  video_stream scans the NTSC frame; pos2addr reads the frame
//           buffer, rgb2ycrcb converts, equalizer overlays its bars (sw[7]),
//           and the stream goes to the encoder, set up by adv7194_init.
//   input:  a PS/2 keyboard (ps2_ascii, key_decode) drives the equalizer
//           with W/A/S/D and Enter; the board's enter button (debounced)
//           chooses the headphone source.
//   test:   sw[4] replaces the audio buckets by bucket_gen (sw[5] makes it
//           move; its 0..255 levels are used as sizes directly); sw[6] low replaces the visualizer by solid_fill, which
//           paints the colour of sw[2:0].
// The LEDs show the inverted output coefficient of bucket 0.
//
// The FFT, the inverse FFT, its low-pass filter, the AC97 driver and the
// encoder chip are not part of this RTL; their signals are ports. All logic
// runs on the one 27 MHz clock; rst is synchronous and active high.
module music_visualizer
  import avs_pkg::*;
#(
  parameter int unsigned TICK_DIVIDE     = 270_000,  // 100 Hz ball physics
  parameter int unsigned DEBOUNCE_CYCLES = 270_000,  // 10 ms
  parameter int unsigned I2C_CLK_DIV     = 27,       // 1 MHz I2C steps
  parameter bit          COLORBARS       = 1'b0      // encoder colour-bar test mode
) (
  input  logic               clk,             // 27 MHz
  input  logic               rst,
  // AC97 driver
  input  logic               ac97_ready,
  input  logic        [7:0]  from_ac97_data,
  output logic        [7:0]  to_ac97_data,
  // forward FFT
  output logic        [7:0]  fft_xn_re,
  output logic               fft_ce,
  input  logic               fft_dv,
  input  logic signed [18:0] fft_xk_re,
  input  logic signed [18:0] fft_xk_im,
  input  logic        [9:0]  fft_xk_index,
  // inverse FFT
  output logic signed [17:0] mul_re,
  output logic signed [17:0] mul_im,
  output logic               ifft_enable,
  // ADV7194 encoder
  output logic        [9:0]  tv_out_ycrcb,
  output logic               tv_out_reset_b,
  output logic               tv_out_i2c_clock,
  output logic               tv_out_i2c_data,
  // user
  input  logic               button_enter,    // low while pressed
  input  logic        [7:0]  switch,
  input  logic               ps2_clock,
  input  logic               ps2_data,
  output logic        [7:0]  led
);
  // ---------------- audio ----------------
  logic        playback;
  logic [16:0] fft_bkt_mag, gen_bkt_mag, bkt_mag;
  logic [2:0]  fft_bkt_index, gen_bkt_index, bkt_index;
  logic        fft_bkt_valid, gen_bkt_valid, bkt_valid;

  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_debounce (
    .clk, .rst, .noisy(button_enter), .clean(playback));

  recorder u_recorder (
    .clk, .rst, .playback, .ready(ac97_ready), .from_ac97_data, .to_ac97_data,
    .fft_xn_re, .fft_ce, .fft_dv, .xk_re(fft_xk_re), .xk_im(fft_xk_im),
    .xk_index(fft_xk_index),
    .bkt_mag(fft_bkt_mag), .bkt_index(fft_bkt_index), .bkt_valid(fft_bkt_valid));

  bucket_gen u_bucket_gen (
    .clk, .rst, .advance(switch[5]),
    .bkt_index(gen_bkt_index), .bkt_mag(gen_bkt_mag), .bkt_valid(gen_bkt_valid));

  // The visualizer takes magnitudes / 2 (16-bit bucket registers). The
  // generated levels are sizes of 0..255 already, so they are doubled first
  // and reach the whole size range, balls included.
  assign bkt_mag   = switch[4] ? {gen_bkt_mag[15:0], 1'b0} : fft_bkt_mag;
  assign bkt_index = switch[4] ? gen_bkt_index : fft_bkt_index;
  assign bkt_valid = switch[4] ? gen_bkt_valid : fft_bkt_valid;

  logic [2:0] mul_index;
  logic [7:0] coeff;
  logic [NUM_BUCKETS-1:0][7:0] coeffs;

  eq_multiplier u_eq_mul (
    .clk, .rst, .dv(fft_dv), .xk_re(fft_xk_re), .xk_im(fft_xk_im),
    .xk_index(fft_xk_index), .coeff, .mul_index, .mul_re, .mul_im, .ifft_enable);

  // ---------------- video timing ----------------
  ycrcb_t     ycc_eq;
  logic [9:0] h_position, v_position, h_next, v_next;
  logic       row_done, frame_done, timing_code;

  video_stream u_stream (
    .clk, .rst, .ycc_in(ycc_eq), .ycrcb(tv_out_ycrcb),
    .h_position, .v_position, .h_next, .v_next,
    .row_done, .frame_done, .timing_code);

  // ---------------- visualizer and frame buffer ----------------
  logic                         vis_we;
  logic [FB_ADDR_W-1:0]         vis_addr, fill_addr, waddr, raddr;
  rgb565_t                      vis_rgb, fill_rgb, wdata, pixel;
  logic                         fill_we, we;
  logic [NUM_BUCKETS-1:0][15:0] bucket;
  logic [NUM_BUCKETS-1:0]       ball_flying;

  visualizer_layer #(.TICK_DIVIDE(TICK_DIVIDE)) u_vis (
    .clk, .rst, .bkt_mag(bkt_mag[16:1]), .bkt_index, .bkt_valid,
    .row_done, .frame_done, .vcount(v_position), .sel(switch[1:0]),
    .we(vis_we), .addr(vis_addr), .rgb_data(vis_rgb), .bucket, .ball_flying);

  pos2addr u_pos2addr (.h_position(h_next), .v_position(v_next), .addr(raddr));

  solid_fill u_fill (
    .clk, .rst, .sw(switch[2:0]), .raddr, .we(fill_we), .waddr(fill_addr),
    .wdata(fill_rgb));

  assign we    = switch[6] ? vis_we   : fill_we;
  assign waddr = switch[6] ? vis_addr : fill_addr;
  assign wdata = switch[6] ? vis_rgb  : fill_rgb;

  video_mem u_mem (.clk, .we, .waddr, .wdata, .raddr, .rdata(pixel));

  ycrcb_t ycc_ram;
  rgb2ycrcb u_r2y (.pixel, .ycc(ycc_ram));

  // ---------------- keyboard and equalizer ----------------
  logic [7:0] ascii, keycode;
  logic       ascii_ready;
  logic       k_up, k_left, k_down, k_right, k_enter;
  logic [2:0] eq_bucket;

  ps2_ascii u_kbd (
    .clk, .rst, .ps2_clk(ps2_clock), .ps2_data, .ascii, .keycode, .ascii_ready);

  key_decode u_keys (
    .ascii, .ascii_ready, .up(k_up), .left(k_left), .down(k_down),
    .right(k_right), .enter(k_enter));

  equalizer u_eq (
    .clk, .rst, .enable(switch[7]), .left(k_left), .right(k_right), .up(k_up),
    .down(k_down), .enter(k_enter), .ycc_in(ycc_ram), .h_position, .v_position,
    .coeff_ind(mul_index), .ycc_out(ycc_eq), .coeff, .coeffs, .bucket(eq_bucket));

  assign led = ~coeffs[0];

  // ---------------- encoder set-up ----------------
  logic configured;
  adv7194_init #(.CLK_DIV(I2C_CLK_DIV)) u_init (
    .clk, .rst, .colorbars(COLORBARS), .tv_reset_b(tv_out_reset_b),
    .i2c_scl(tv_out_i2c_clock), .i2c_sda(tv_out_i2c_data), .configured);
endmodule
