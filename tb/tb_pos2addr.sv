// tb_pos2addr: full-resolution positions map to (v/2)*360 + h/2.
module tb_pos2addr;
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
  logic [9:0] h_position, v_position;
  logic [16:0] addr;
  pos2addr dut (.h_position, .v_position, .addr);
  initial begin
    for (int v = 0; v < 486; v += 3)
      for (int h = 0; h < 720; h += 11) begin
        h_position = 10'(h); v_position = 10'(v); #1;
        check(int'(addr) == (v / 2) * 360 + h / 2, $sformatf("addr(%0d,%0d) = %0d", h, v, addr));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
