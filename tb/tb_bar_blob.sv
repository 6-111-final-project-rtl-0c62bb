// tb_bar_blob: scans the 360x243 screen for several heights with a bar at
// X=100 and compares each pixel with a rectangle test written here: the bar
// stands on row 242 and is lit for columns 100..129 and rows above 242-h.
module tb_bar_blob;
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
  logic [9:0] hcount, vcount, height;
  rgb565_t pixel;
  bar_blob #(.X(100), .Y(242), .WIDTH(30), .COLOR(RGB_RED)) dut (.hcount, .vcount, .height, .pixel);
  initial begin
    int hs [5] = '{0, 1, 50, 242, 400};
    foreach (hs[k]) begin
      height = 10'(hs[k]);
      for (int v = 0; v < 243; v += 1)
        for (int h = 90; h < 140; h += 1) begin
          bit lit;
          hcount = 10'(h); vcount = 10'(v); #1;
          lit = (h >= 100 && h < 130 && v <= 242 && v > 242 - hs[k]);
          check(pixel == (lit ? RGB_RED : RGB_BLACK), $sformatf("h %0d (%0d,%0d)", hs[k], h, v));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
