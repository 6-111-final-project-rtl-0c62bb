// tb_key_decode: every character code with and without the ready strobe;
// exactly W/A/S/D/Enter (upper-case letters, as the keyboard decoder produces) give their command,
// only while ascii_ready is high.
module tb_key_decode;
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0] ascii;
  logic ascii_ready, up, left, down, right, enter;
  key_decode dut (.ascii, .ascii_ready, .up, .left, .down, .right, .enter);
  initial begin
    for (int c = 0; c < 256; c++)
      for (int r = 0; r < 2; r++) begin
        ascii = 8'(c); ascii_ready = r[0]; #1;
        check(up    == (r == 1 && (c == "W")), $sformatf("up for %0d", c));
        check(left  == (r == 1 && (c == "A")), $sformatf("left for %0d", c));
        check(down  == (r == 1 && (c == "S")), $sformatf("down for %0d", c));
        check(right == (r == 1 && (c == "D")), $sformatf("right for %0d", c));
        check(enter == (r == 1 && c == 13), $sformatf("enter for %0d", c));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
