// tb_diagonal_bar: a bar from (60,242) pointing up and right at 45 degrees.
// Each pixel must be lit exactly when it is within 5 of the line h+v=302 and
// within the bar length of the base point, computed here with integers.
module tb_diagonal_bar;
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
  logic [9:0] hcount, vcount, height;
  rgb565_t pixel;
  diagonal_bar #(.X(60), .Y(242), .WIDTH(5), .COLOR(RGB_GREEN)) dut (.hcount, .vcount, .height, .pixel);
  initial begin
    int hs [4] = '{0, 20, 100, 300};
    foreach (hs[k]) begin
      height = 10'(hs[k]);
      for (int v = 0; v < 243; v += 2)
        for (int h = 0; h < 360; h += 3) begin
          int d, dx, dy;
          bit lit;
          hcount = 10'(h); vcount = 10'(v); #1;
          d = h + v - 302; dx = h - 60; dy = v - 242;
          lit = (d <= 5 && d >= -5) && (dx * dx + dy * dy <= hs[k] * hs[k]);
          check(pixel == (lit ? RGB_GREEN : RGB_BLACK), $sformatf("len %0d (%0d,%0d)", hs[k], h, v));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
