// tb_ball_physics: the ball must follow the anchor while the bar is short,
// launch when the bar passes the threshold, then move on each tick along the
// parabola x+=3, y+=vy, vy+=1 from vy=-8 (model here), ignore the anchor and
// clock cycles without a tick, and come back to the anchor once it has
// left the screen.
module tb_ball_physics;
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
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, tick, flying;
  logic [9:0] anchor_x, anchor_y, height, x_out, y_out;
  ball_physics dut (.clk, .rst, .tick, .anchor_x, .anchor_y, .height, .x_out, .y_out, .flying);
  initial begin
    int mx, my, mvy, n_ticks;
    rst = 1; tick = 0; anchor_x = 0; anchor_y = 0; height = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      anchor_x = 10'($urandom % 300); anchor_y = 10'($urandom % 240); height = 10'($urandom % 193);
      tick = $urandom % 2;
      @(negedge clk);
      check(!flying && x_out == anchor_x && y_out == anchor_y, "ball does not follow the anchor");
    end
    for (int launch = 0; launch < 2; launch++) begin
      anchor_x = 10'(100 + 40 * launch); anchor_y = 10'(120); height = 10'(193);
      tick = 0;
      @(negedge clk);
      check(flying, "no launch above the threshold");
      mx = 100 + 40 * launch; my = 120; mvy = -8;
      height = 0; anchor_x = 5; anchor_y = 5;
      n_ticks = 0;
      while (flying && n_ticks < 200) begin
        repeat (1 + $urandom % 3) begin
          @(negedge clk);
          check(flying, "landed without a tick");
        end
        tick = 1;
        @(negedge clk);
        tick = 0;
        n_ticks++;
        if (my > 251 || mx > 368) begin
          check(!flying, "ball did not come back after leaving the screen");
        end else begin
          mx += 3; my += mvy; mvy += 1;
          check(flying && int'(x_out) == mx && int'(y_out) == (my < 0 ? 1023 : my),
                $sformatf("tick %0d: (%0d,%0d) expected (%0d,%0d)", n_ticks, x_out, y_out, mx, my));
        end
      end
      check(!flying, "ball never came back");
      @(negedge clk);
      check(x_out == 5 && y_out == 5, "ball not reattached to the anchor");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
