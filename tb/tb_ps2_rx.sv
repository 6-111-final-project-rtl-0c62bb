// tb_ps2_rx: a keyboard model sends PS/2 frames (start, 8 data bits LSB
// first, odd parity, stop; data changes while the clock is high, the host
// samples on the falling edge). Good frames must come out of the FIFO in
// order; frames with a wrong parity or stop bit must be dropped; more than
// DEPTH unread frames must set overflow, keep the first DEPTH bytes and
// clear overflow on the next read.
module tb_ps2_rx;
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
  logic rst, ps2_clk, ps2_data, rd, empty, overflow;
  logic [7:0] data;
  ps2_rx #(.DEPTH(4)) dut (.clk, .rst, .ps2_clk, .ps2_data, .rd, .data, .empty, .overflow);

  task automatic send(input logic [7:0] b, input bit bad_parity = 0, input bit bad_stop = 0);
    logic [10:0] f;
    f = {~bad_stop, ~(^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(negedge clk);
      ps2_clk = 0;
      repeat (40) @(negedge clk);
      ps2_clk = 1;
      repeat (20) @(negedge clk);
    end
    ps2_data = 1;
    repeat (100) @(negedge clk);
  endtask

  task automatic read_expect(input logic [7:0] b);
    check(!empty, "FIFO empty, expected a byte");
    check(data == b, $sformatf("read %h, expected %h", data, b));
    rd = 1; @(negedge clk); rd = 0;
  endtask

  initial begin
    logic [7:0] q [$];
    rst = 1; ps2_clk = 1; ps2_data = 1; rd = 0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);
    check(empty && !overflow, "not empty after reset");
    for (int i = 0; i < 12; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      send(b);
      read_expect(b);
      check(empty, "more than one byte per frame");
    end
    send(8'h1C, 1, 0);
    check(empty, "frame with bad parity accepted");
    send(8'h1C, 0, 1);
    check(empty, "frame with bad stop bit accepted");
    for (int i = 0; i < 6; i++) begin
      q.push_back(8'($urandom));
      send(q[i]);
      check(overflow == (i >= 4), $sformatf("overflow %0b after %0d frames", overflow, i + 1));
    end
    read_expect(q[0]);
    check(!overflow, "overflow not cleared by a read");
    for (int i = 1; i < 4; i++) read_expect(q[i]);
    check(empty, "FIFO holds more than DEPTH bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
