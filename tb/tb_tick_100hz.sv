// tb_tick_100hz: with a divide of 37 the tick must be one clock wide and
// come every 37 clocks, the first 37 clocks after reset.
module tb_tick_100hz;
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
  logic rst, tick;
  tick_100hz #(.DIVIDE(37)) dut (.clk, .rst, .tick);
  initial begin
    int last, n;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    last = 0; n = 0;
    for (int c = 1; c <= 1000; c++) begin
      @(negedge clk);
      if (tick) begin
        check(c - last == 37, $sformatf("tick after %0d clocks", c - last));
        last = c; n++;
      end
    end
    check(n == 27, $sformatf("%0d ticks in 1000 clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
