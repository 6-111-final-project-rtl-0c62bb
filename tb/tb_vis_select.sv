// tb_vis_select: each select value passes its own input.
module tb_vis_select;
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
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  rgb565_t [3:0] vis_in;
  logic [1:0] sel;
  rgb565_t vis_out;
  vis_select dut (.vis_in, .sel, .vis_out);
  initial begin
    for (int i = 0; i < 200; i++) begin
      foreach (vis_in[k]) vis_in[k] = 16'($urandom);
      sel = 2'($urandom); #1;
      check(vis_out == vis_in[sel], "wrong visualization selected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
