// tb_bucketizer: streams two 1024-bin spectra into the bucketizer the way a
// clock-enabled FFT does (each bin held for several clocks, with gaps where
// dv is low) and compares every bucket with an average of squared 8-bit
// magnitudes computed here. Also checks that each bucket comes out exactly
// once, in order 0..7, 2 clocks after its last bin first appears.
module tb_bucketizer;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, dv;
  logic signed [18:0] xk_re, xk_im;
  logic [9:0] xk_index;
  logic [16:0] bkt_mag;
  logic [2:0] bkt_index;
  logic bkt_valid;

  bucketizer dut (.clk, .rst, .dv, .xk_re, .xk_im, .xk_index, .bkt_mag, .bkt_index, .bkt_valid);

  int expected_mag [8];
  int n_out = 0;
  int expected_next = 0;
  longint last_bin_time;

  always @(posedge clk) if (!rst && bkt_valid) begin
    check(bkt_index == 3'(expected_next), $sformatf("bucket index %0d, expected %0d", bkt_index, expected_next));
    check(bkt_mag == 17'(expected_mag[bkt_index]), $sformatf("bucket %0d mag %0d expected %0d", bkt_index, bkt_mag, expected_mag[bkt_index]));
    check(($time - last_bin_time) == 20, $sformatf("bucket latency %0t", $time - last_bin_time));
    expected_next = (expected_next + 1) % 8;
    n_out++;
  end

  initial begin
    rst = 1; dv = 0; xk_re = 0; xk_im = 0; xk_index = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int frame = 0; frame < 2; frame++) begin
      int sum;
      sum = 0;
      for (int k = 0; k < 1024; k++) begin
        int re8, im8;
        re8 = $signed(8'($urandom));
        im8 = $signed(8'($urandom));
        if (frame == 1 && k < 128) begin re8 = -128; im8 = -128; end   // largest bucket
        sum += re8 * re8 + im8 * im8;
        if (k % 128 == 127) begin expected_mag[k / 128] = sum / 128; sum = 0; end
        xk_re = 19'(re8 * 2048 + int'($urandom % 2048));
        xk_im = 19'(im8 * 2048 + int'($urandom % 2048));
        xk_index = 10'(k);
        dv = 1;
        if (k % 128 == 127) last_bin_time = $time + 5;
        repeat (1 + $urandom % 4) @(negedge clk);
        if ($urandom % 3 == 0) begin dv = 0; repeat (1 + $urandom % 3) @(negedge clk); end
      end
      dv = 0;
      repeat (10) @(negedge clk);
    end
    check(n_out == 16, $sformatf("%0d buckets out, expected 16", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
