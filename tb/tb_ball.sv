// tb_ball: balls at several positions, including the screen edge; every
// pixel in a window around the ball must be lit exactly within radius 5.
module tb_ball;
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
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [9:0] x, y, hcount, vcount;
  rgb565_t pixel;
  ball #(.RADIUS(5), .COLOR(RGB_WHITE)) dut (.x, .y, .hcount, .vcount, .pixel);
  initial begin
    int px [4] = '{50, 0, 359, 200};
    int py [4] = '{60, 0, 242, 3};
    foreach (px[k]) begin
      x = 10'(px[k]); y = 10'(py[k]);
      for (int v = py[k] - 8; v <= py[k] + 8; v++)
        for (int h = px[k] - 8; h <= px[k] + 8; h++) if (v >= 0 && h >= 0) begin
          bit lit;
          hcount = 10'(h); vcount = 10'(v); #1;
          lit = (h - px[k]) * (h - px[k]) + (v - py[k]) * (v - py[k]) <= 25;
          check(pixel == (lit ? RGB_WHITE : RGB_BLACK), $sformatf("ball (%0d,%0d) pixel (%0d,%0d)", px[k], py[k], h, v));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
