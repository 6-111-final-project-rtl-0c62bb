// tb_i2c_tx: sends four transfers of 1 to 10 random bytes through the I2C
// byte transmitter, with a bit-quarter enable every 3 clocks. The testbench
// keeps load high while bytes remain and presents the next byte after each
// ack pulse. An independent bus monitor decodes SCL/SDA; it must see, per
// transfer, START, the bytes in order and STOP, with SDA released in every
// acknowledge slot, and the transmitter must be idle with both lines high
// between transfers.
module tb_i2c_tx;
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
  logic rst, en, load, ack, idle, scl, sda;
  logic [7:0] data;
  int expected [$];

  i2c_tx dut (.clk, .rst, .en, .data, .load, .ack, .idle, .scl, .sda);
  i2c_monitor mon (.scl, .sda);

  int div = 0;
  always @(posedge clk) begin
    div = (div + 1) % 3;
    en <= (div == 0);
  end

  initial begin
    rst = 1; load = 0; data = 0; en = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    mon.items.delete();
    repeat (10) @(negedge clk);
    check(idle && scl && sda, "bus not idle after reset");
    for (int t = 0; t < 4; t++) begin
      int n, sent;
      n = 1 + $urandom % 10;
      expected.push_back(-1);
      sent = 0;
      data = 8'($urandom); load = 1;
      while (sent < n) begin
        @(posedge clk);
        if (ack) begin
          expected.push_back(int'(data));
          sent++;
          @(negedge clk);
          if (sent < n) data = 8'($urandom);
          else load = 0;
        end
      end
      expected.push_back(-2);
      while (!idle) @(negedge clk);
      repeat (20) @(negedge clk);
      check(idle && scl && sda, "bus not idle between transfers");
    end
    check(mon.items.size() == expected.size(), $sformatf("%0d bus events, expected %0d", mon.items.size(), expected.size()));
    for (int i = 0; i < expected.size() && i < mon.items.size(); i++)
      check(mon.items[i] == expected[i], $sformatf("bus event %0d is %0d, expected %0d", i, mon.items[i], expected[i]));
    check(mon.ack_released, "SDA driven low in an acknowledge slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
