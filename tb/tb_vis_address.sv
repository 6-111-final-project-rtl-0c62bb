// tb_vis_address: every row and a spread of columns: address = row*360+col.
module tb_vis_address;
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
  logic [9:0] row, col;
  logic [16:0] addr;
  vis_address dut (.row, .col, .addr);
  initial begin
    for (int r = 0; r < 243; r++)
      for (int c = 0; c < 360; c += 7) begin
        row = 10'(r); col = 10'(c); #1;
        check(int'(addr) == r * 360 + c, $sformatf("addr(%0d,%0d) = %0d", r, c, addr));
      end
    row = 242; col = 359; #1;
    check(addr == 17'd87479, "last address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
