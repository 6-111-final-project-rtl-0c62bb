// tb_recorder: drives 48 kHz-style ready strobes (high for several clocks)
// with random microphone samples. With playback high the headphone output
// must be the top 8 bits of the 750 Hz sine (one frame behind), with playback
// low the microphone sample; the FFT input must be the microphone sample and
// its clock enable the ready strobe. One bucket of FFT output is streamed in
// to check that buckets come out of the recorder.
module tb_recorder;
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, playback, ready, fft_ce, fft_dv, bkt_valid;
  logic [7:0] from_ac97_data, to_ac97_data, fft_xn_re;
  logic signed [18:0] xk_re, xk_im;
  logic [9:0] xk_index;
  logic [16:0] bkt_mag;
  logic [2:0] bkt_index;

  recorder dut (.clk, .rst, .playback, .ready, .from_ac97_data, .to_ac97_data, .fft_xn_re, .fft_ce,
                .fft_dv, .xk_re, .xk_im, .xk_index, .bkt_mag, .bkt_index, .bkt_valid);

  assign fft_dv = 1'b0;
  assign xk_re = '0;
  assign xk_im = '0;
  assign xk_index = '0;

  initial begin
    int n_buckets;
    rst = 1; playback = 1; ready = 0; from_ac97_data = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 1; n <= 140; n++) begin
      logic [7:0] mic;
      real s;
      int e;
      mic = 8'($urandom);
      if (n == 70) playback = 0;
      from_ac97_data = mic;
      ready = 1;
      check(fft_ce == 1'b1, "fft_ce does not follow ready");
      repeat (4) @(negedge clk);
      ready = 0;
      check(fft_ce == 1'b0, "fft_ce does not follow ready");
      check(fft_xn_re == mic, "FFT input is not the microphone sample");
      if (playback) begin
        s = (2.0**19 - 1) * $sin(2.0 * 3.14159265358979 * (n - 2) / 64.0) / 4096.0;
        e = (n == 1) ? 0 : int'($floor(s));
        check(int'($signed(to_ac97_data)) - e <= 1 && e - int'($signed(to_ac97_data)) <= 1,
              $sformatf("frame %0d tone %0d expected about %0d", n, $signed(to_ac97_data), e));
      end else begin
        check(to_ac97_data == mic, "loop-back sample wrong");
      end
      from_ac97_data = 8'($urandom);   // must not be taken until the next strobe
      repeat (6) @(negedge clk);
      if (!playback) check(to_ac97_data == mic, "output changed between strobes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
