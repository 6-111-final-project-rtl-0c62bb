// tb_tone_750hz: checks the 750 Hz test tone against a real-number sine.
// Steps the tone 130 times with gaps between steps; after step n the output
// must be (2^19-1)*sin(2*pi*(n-1)/64) within 0.25 % of full scale, must not
// change without a step, and must repeat every 64 steps (750 Hz at 48 kHz).
module tb_tone_750hz;
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, step;
  logic signed [19:0] tone;
  logic signed [19:0] hist [$];

  tone_750hz dut (.clk, .rst, .step, .tone);

  initial begin
    real expect_v;
    rst = 1; step = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int n = 1; n <= 130; n++) begin
      @(negedge clk) step = 1;
      @(negedge clk) step = 0;
      expect_v = (2.0**19 - 1) * $sin(2.0 * 3.14159265358979 * (n - 1) / 64.0);
      check((real'(tone) - expect_v) < 1311.0 && (expect_v - real'(tone)) < 1311.0,
            $sformatf("step %0d tone %0d expected %0f", n, tone, expect_v));
      hist.push_back(tone);
      repeat (3) @(negedge clk);
      check(tone == hist[$], "tone changed without a step");
    end
    for (int n = 64; n < 130; n++) check(hist[n] == hist[n - 64], "period is not 64 samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
