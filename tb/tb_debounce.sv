// tb_debounce: with a 20-clock window, bursts of bounces shorter than the
// window must not change the output, and a level held for the window must
// appear 22 clocks after it settled.
module tb_debounce;
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
  logic rst, noisy, clean;

  debounce #(.STABLE_CYCLES(20)) dut (.clk, .rst, .noisy, .clean);

  initial begin
    int t;
    rst = 1; noisy = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    check(clean == 1, "reset value should follow input");
    for (int b = 0; b < 20; b++) begin
      noisy = ~noisy;
      repeat (1 + $urandom % 15) @(negedge clk);
      check(clean == 1, "output followed a bounce");
    end
    noisy = 0;
    t = 0;
    while (clean != 0 && t < 100) begin @(negedge clk); t++; end
    check(t == 22, $sformatf("settled after %0d clocks, expected 22", t));
    noisy = 1;
    repeat (10) @(negedge clk);
    noisy = 0;
    repeat (40) @(negedge clk);
    check(clean == 0, "short pulse went through");
    noisy = 1;
    repeat (25) @(negedge clk);
    check(clean == 1, "long level did not go through");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
