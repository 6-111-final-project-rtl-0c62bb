// tb_adv7194_init: the encoder set-up sequencer with a short enable period.
// Checks that the encoder reset is held low after reset and released before
// any bus traffic, that the bus then carries exactly one write of
// 0x56, sub-address 0x00 and the eight register values, that `configured`
// rises after it, and that each change of the colour-bar input causes one
// write of 0x56, 0x04 and register 4 with bit 6 equal to the input.
module tb_adv7194_init;
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
  logic rst, colorbars, tv_reset_b, i2c_scl, i2c_sda, configured;
  adv7194_init #(.CLK_DIV(3), .RESET_HOLD(10)) dut (.clk, .rst, .colorbars, .tv_reset_b, .i2c_scl, .i2c_sda, .configured);
  i2c_monitor mon (.scl(i2c_scl), .sda(i2c_sda));

  int expected [$] = '{-1, 'h56, 'h00, 'h00, 'h47, 'h40, 'h00, 'h00, 'h09, 'h01, 'h00, -2};
  bit seen_reset_low = 0;
  always @(posedge clk) if (!rst && !tv_reset_b) begin
    seen_reset_low = 1;
    check(mon.items.size() == 0 || configured, "encoder in reset during bus traffic");
  end

  task automatic wait_configured_idle();
    int c;
    c = 0;
    while (!configured && c < 100000) begin @(negedge clk); c++; end
    repeat (3000) @(negedge clk);
  endtask

  initial begin
    rst = 1; colorbars = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    mon.items.delete();
    check(!configured, "configured during reset");
    wait_configured_idle();
    check(configured, "never configured");
    check(seen_reset_low, "encoder reset never asserted");
    check(tv_reset_b, "encoder left in reset");
    for (int k = 0; k < 3; k++) begin
      colorbars = ~colorbars;
      expected.push_back(-1); expected.push_back('h56); expected.push_back('h04);
      expected.push_back(colorbars ? 'h40 : 'h00); expected.push_back(-2);
      repeat (3000) @(negedge clk);
      check(configured, "configured dropped");
    end
    check(mon.items.size() == expected.size(), $sformatf("%0d bus events, expected %0d", mon.items.size(), expected.size()));
    for (int i = 0; i < expected.size() && i < mon.items.size(); i++)
      check(mon.items[i] == expected[i], $sformatf("bus event %0d is %0d, expected %0d", i, mon.items[i], expected[i]));
    check(i2c_scl && i2c_sda, "bus not idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
