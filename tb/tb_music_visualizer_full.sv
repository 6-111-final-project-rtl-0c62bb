// tb_music_visualizer: end-to-end test of the whole visualizer. Stand-ins
// for the parts outside the design drive its ports: an audio codec gives a
// 48 kHz sample strobe with microphone samples, an FFT gives streams of
// 1024 bins (loud in bucket 2, quiet elsewhere), a PS/2 keyboard types
// commands, and an I2C monitor and a CCIR-656 decoder watch the encoder
// lines. This version leaves every parameter of the design at its default.
//
// Over several frames the switches select the solid-colour writer, then the
// visualizer in each of its four pictures, the built-in bucket generator
// and the equalizer overlay. Checked along the way:
// - the encoder set-up write on the I2C bus, byte by byte;
// - the video stream: timing codes, 1716 words per line, and every active
//   word equal to the colour-space conversion of the frame-buffer pixel at
//   that screen position, where the frame buffer is a copy kept here of
//   everything written into the design's memory;
// - the headphone output: the test tone (period 64 samples) while the
//   button is up, the microphone samples while it is down;
// - the equalizer products on the way to the inverse FFT, with the
//   coefficients the keyboard set (down once on bucket 0, then enter).
// Each mechanism is counted and one that never happened is a failure.
module tb_music_visualizer_full;
  import avs_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // watchdog
  initial begin
    repeat (9000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, ac97_ready, fft_ce, fft_dv, ifft_enable, tv_out_reset_b, tv_out_i2c_clock, tv_out_i2c_data;
  logic button_enter, ps2_clock, ps2_data;
  logic [7:0] from_ac97_data, to_ac97_data, fft_xn_re, switch, led;
  logic signed [18:0] fft_xk_re, fft_xk_im;
  logic [9:0] fft_xk_index, tv_out_ycrcb;
  logic signed [17:0] mul_re, mul_im;

  music_visualizer  dut (
    .clk, .rst, .ac97_ready, .from_ac97_data, .to_ac97_data, .fft_xn_re, .fft_ce, .fft_dv,
    .fft_xk_re, .fft_xk_im, .fft_xk_index, .mul_re, .mul_im, .ifft_enable, .tv_out_ycrcb,
    .tv_out_reset_b, .tv_out_i2c_clock, .tv_out_i2c_data, .button_enter, .switch,
    .ps2_clock, .ps2_data, .led);

  i2c_monitor mon (.scl(tv_out_i2c_clock), .sda(tv_out_i2c_data));

  localparam bit REDUCED = 0;
  localparam int FRAMES = REDUCED ? 6 : 5;

  // ---------------------------------------------------------------- counters
  int n_eav = 0, n_sav = 0, n_frames = 0, n_row_done = 0, n_words = 0;
  int n_fill_writes = 0, n_vis_writes = 0, n_fft_buckets = 0, n_gen_buckets = 0;
  int n_sel [4] = '{0, 0, 0, 0};
  int n_keys = 0, n_overlay = 0, n_ifft = 0, n_tone = 0, n_loop = 0, n_launch = 0, n_return = 0;
  bit committed = 0, configured_ok = 0;

  // ------------------------------------------------------ frame buffer copy
  logic [15:0] fb_val [FB_DEPTH], fb_prev [FB_DEPTH];
  int fb_stamp [FB_DEPTH];
  bit fb_known [FB_DEPTH], fb_prev_known [FB_DEPTH];
  int cyc = 0;

  function automatic logic [9:0] conv(input logic [15:0] p, input int which);   // 0 Y, 1 Cr, 2 Cb
    int r, g, b, y, c;
    r = int'(p[15:11]) * 8; g = int'(p[10:5]) * 4; b = int'(p[4:0]) * 8;
    y = (306 * r + 601 * g + 117 * b) / 1024;
    if (which == 0) return 10'(y * 4);
    c = (which == 1) ? ((720 * (r - y)) >>> 10) + 128 : ((579 * (b - y)) >>> 10) + 128;
    if (c < 0) c = 0;
    if (c > 255) c = 255;
    return 10'(c * 4);
  endfunction

  // --------------------------------------------------------- 656 decoder
  logic [9:0] w1 = 0, w2 = 0, w3 = 0;
  bit in_active = 0, v_line = 1, f_line = 0, prev_v = 1, check_data = 0;
  int word_k = 0, line_len = 0, field_row = 0;
  bit prev_flying [8];

  always @(posedge clk) if (!rst) begin
    logic [9:0] w;
    cyc++;
    w = tv_out_ycrcb;
    line_len++;
    if (w3 == 10'h3FC && w2 == 10'h000 && w1 == 10'h000) begin
      bit f, v, h;
      f = w[8]; v = w[7]; h = w[6];
      check(w[9] && w[5:2] == {v ^ h, f ^ h, f ^ v, f ^ v ^ h}, $sformatf("bad timing code %h", w));
      if (h) begin
        n_eav++;
        if (in_active) check(word_k == 1443, $sformatf("active part of %0d words", word_k - 3));
        in_active = 0;
      end else begin
        if (n_sav > 0) check(line_len == 1716, $sformatf("line of %0d words", line_len));
        n_sav++;
        line_len = 0;
        if (!v && prev_v) field_row = 0;
        else if (!v) field_row++;
        prev_v = v; v_line = v; f_line = f;
        in_active = 1; word_k = 0;
      end
    end else if (in_active) begin
      int k, row, col, a;
      logic [15:0] px;
      bit known;
      k = word_k;
      word_k++;
      if (k < 1440 && !v_line && check_data) begin
        row = field_row; col = k / 4;   // two words per pixel of the 720-wide line, two line pixels per frame pixel
        a = row * 360 + col;
        if (fb_stamp[a] >= cyc - 2) begin px = fb_prev[a]; known = fb_prev_known[a]; end
        else begin px = fb_val[a]; known = fb_known[a]; end
        if (known) begin
          logic [9:0] e;
          case (k % 4)
            0: e = conv(px, 2);
            2: e = conv(px, 1);
            default: e = conv(px, 0);
          endcase
          n_words++;
          check(w == e, $sformatf("field %0d row %0d word %0d is %h, expected %h (pixel %h)", f_line, row, k, w, e, px));
        end
      end
      if (k < 1440 && !v_line && switch[7] && w == 10'd940) n_overlay++;
    end
    w3 = w2; w2 = w1; w1 = w;
    // writes into the frame buffer, seen at the memory port
    if (dut.we && dut.waddr < 17'(FB_DEPTH)) begin
      fb_prev[dut.waddr] = fb_val[dut.waddr];
      fb_prev_known[dut.waddr] = fb_known[dut.waddr];
      fb_val[dut.waddr] = dut.wdata;
      fb_known[dut.waddr] = 1;
      fb_stamp[dut.waddr] = cyc;
      if (switch[6]) begin n_vis_writes++; n_sel[switch[1:0]]++; end
      else n_fill_writes++;
    end
    if (dut.frame_done) n_frames++;
    if (dut.row_done) n_row_done++;
    if (dut.fft_bkt_valid) n_fft_buckets++;
    if (switch[4] && dut.gen_bkt_valid) n_gen_buckets++;
    if (dut.ascii_ready) n_keys++;
    for (int i = 0; i < 8; i++) begin
      if (dut.ball_flying[i] && !prev_flying[i]) n_launch++;
      if (!dut.ball_flying[i] && prev_flying[i]) n_return++;
      prev_flying[i] = dut.ball_flying[i];
    end
  end

  // ------------------------------------------------------------ FFT stand-in
  int bank [8] = '{255, 255, 255, 255, 255, 255, 255, 255};
  logic signed [18:0] p_re, p_im;
  logic [9:0] p_idx;
  bit p_dv = 0;
  int p_c0 = 255;    // bucket 0 coefficient as the LEDs show it (others stay 255)
  always @(posedge clk) if (!rst) begin
    if (p_dv) begin
      int er, ei;
      int c;
      c = (p_idx[9:7] == 0) ? p_c0 : bank[p_idx[9:7]];
      er = int'($signed(p_re[18:11])) * c;
      ei = int'($signed(p_im[18:11])) * c;
      check(ifft_enable, "ifft_enable missing");
      check(int'(mul_re) == er && int'(mul_im) == ei, $sformatf("product %0d/%0d expected %0d/%0d", mul_re, mul_im, er, ei));
      n_ifft++;
    end else check(!ifft_enable, "ifft_enable without data");
    p_re = fft_xk_re; p_im = fft_xk_im; p_idx = fft_xk_index; p_dv = fft_dv; p_c0 = int'(8'(~led));
  end

  initial begin
    fft_dv = 0; fft_xk_re = 0; fft_xk_im = 0; fft_xk_index = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    forever begin
      for (int k = 0; k < 1024; k++) begin
        int m;
        m = (k / 128 == 2) ? 20 : 3;
        fft_xk_index = 10'(k);
        fft_xk_re = 19'(($urandom % 2 ? m : -m) * 2048 + int'($urandom % 2048));
        fft_xk_im = 19'(($urandom % 2 ? m : -m) * 2048 + int'($urandom % 2048));
        fft_dv = 1;
        @(negedge clk); @(negedge clk);
        fft_dv = 0;
        @(negedge clk);
      end
      repeat (3000) @(negedge clk);
    end
  end

  // ------------------------------------------------------- audio stand-in
  logic [7:0] tone_hist [$];
  initial begin
    logic [7:0] mic;
    int n_strobes = 0;
    ac97_ready = 0; from_ac97_data = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    forever begin
      mic = 8'($urandom);
      from_ac97_data = mic;
      ac97_ready = 1;
      repeat (4) @(negedge clk);
      ac97_ready = 0;
      check(fft_xn_re == mic, "FFT input is not the microphone sample");
      n_strobes++;
      if (dut.playback && n_strobes > 2) begin
        tone_hist.push_back(to_ac97_data);
        if (tone_hist.size() > 64) begin
          check(to_ac97_data == tone_hist[0], "tone is not periodic in 64 samples");
          void'(tone_hist.pop_front());
          n_tone++;
        end
      end else if (n_strobes > 2) begin
        tone_hist.delete();
        check(to_ac97_data == mic, "microphone loop-back");
        n_loop++;
      end
      repeat (558) @(negedge clk);
    end
  end

  // ---------------------------------------------------------- keyboard
  task automatic ps2_send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~(^b), b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (100) @(negedge clk);
      ps2_clock = 0;
      repeat (200) @(negedge clk);
      ps2_clock = 1;
      repeat (100) @(negedge clk);
    end
    ps2_data = 1;
    repeat (500) @(negedge clk);
  endtask

  task automatic key(input logic [7:0] code);
    ps2_send(code); ps2_send(8'hF0); ps2_send(code);
  endtask

  task automatic wait_frames(input int n);
    int target;
    target = n_sav + 525 * n;
    while (n_sav < target) @(negedge clk);
  endtask

  // ---------------------------------------------------------- the run
  initial begin
    rst = 1; button_enter = 1; ps2_clock = 1; ps2_data = 1;
    switch = 8'b0000_0101;               // solid fill, magenta
    foreach (fb_known[a]) begin fb_known[a] = 0; fb_prev_known[a] = 0; fb_stamp[a] = 0; end
    foreach (prev_flying[i]) prev_flying[i] = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    mon.items.delete();
    check_data = 1;
    wait_frames(1);
    switch = 8'b0100_0000;               // visualizer, vertical bars
    wait_frames(1);
    switch = 8'b0100_0001;               // diagonal bars and balls
    button_enter = 0;                    // microphone loop-back from here
    wait_frames(1);
    switch = 8'b0111_0010;               // radial picture, generated buckets, advancing
    wait_frames(1);
    switch = 8'b1100_0011;               // circle lenses with the equalizer overlay
    check_data = 0;
    key(8'h1B);                          // S: bucket 0 down one step
    key(8'h5A);                          // Enter: commit
    @(negedge clk);
    committed = (led == ~8'(255 - 32));
    check(committed, $sformatf("LEDs show %h after the commit", led));
    wait_frames(1);
    switch = 8'b0100_0001;
    wait_frames(1);
    check_data = 1;
    wait_frames(FRAMES - 6 > 0 ? FRAMES - 6 : 0);
    wait_frames(1);

    // the encoder set-up write
    begin
      int exp_items [$] = '{-1, 'h56, 'h00, 'h00, 'h47, 'h40, 'h00, 'h00, 'h09, 'h01, 'h00, -2};
      configured_ok = mon.items.size() == exp_items.size();
      for (int i = 0; i < exp_items.size() && i < mon.items.size(); i++)
        if (mon.items[i] != exp_items[i]) configured_ok = 0;
      check(configured_ok, $sformatf("encoder set-up: %0d bus events", mon.items.size()));
      check(tv_out_reset_b, "encoder held in reset");
    end

    $display("mechanisms: eav %0d sav %0d frames %0d row_done %0d words %0d fill %0d vis %0d",
             n_eav, n_sav, n_frames, n_row_done, n_words, n_fill_writes, n_vis_writes);
    $display("  sel %0d %0d %0d %0d fft_buckets %0d gen_buckets %0d keys %0d overlay %0d",
             n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_fft_buckets, n_gen_buckets, n_keys, n_overlay);
    $display("  ifft %0d tone %0d loop %0d launch %0d return %0d", n_ifft, n_tone, n_loop, n_launch, n_return);
    check(n_eav > 0 && n_sav > 0, "no timing codes");
    check(n_frames > 0, "no frame_done");
    check(n_row_done > 0, "no row_done");
    check(n_words > 0, "no video word checked");
    check(n_fill_writes > 0, "solid fill never wrote");
    check(n_vis_writes > 0, "visualizer never wrote");
    for (int s = 0; s < 4; s++) check(n_sel[s] > 0, $sformatf("picture %0d never drawn", s));
    check(n_fft_buckets > 0, "no FFT buckets");
    check(n_gen_buckets > 0, "no generated buckets");
    check(n_keys == 2, $sformatf("%0d key characters, expected 2", n_keys));
    check(n_overlay > 0, "equalizer overlay never shown");
    check(n_ifft > 0, "nothing sent to the inverse FFT");
    check(n_tone > 0, "test tone never played");
    check(n_loop > 0, "microphone never looped back");
    check(n_launch > 0, "no ball launched");
    if (REDUCED) check(n_return > 0, "no ball came back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
