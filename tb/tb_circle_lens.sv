// tb_circle_lens: for several radii, pixels strictly inside radius-1 must
// be the lightened colour, pixels in the ring up to radius+1 the plain
// colour and everything further out white (integer distance model here).
module tb_circle_lens;
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
  logic [9:0] hcount, vcount, radius;
  rgb565_t pixel;
  circle_lens #(.X(150), .Y(91), .COLOR(RGB_BLUE)) dut (.hcount, .vcount, .radius, .pixel);
  initial begin
    int rs [4] = '{0, 1, 12, 40};
    foreach (rs[ri]) begin
      radius = 10'(rs[ri]);
      for (int v = 91 - 45; v <= 91 + 45; v++)
        for (int h = 150 - 45; h <= 150 + 45; h += 2) begin
          int d2, ri_, ro;
          rgb565_t e;
          hcount = 10'(h); vcount = 10'(v); #1;
          d2 = (h - 150) * (h - 150) + (v - 91) * (v - 91);
          ri_ = rs[ri] == 0 ? 0 : rs[ri] - 1; ro = rs[ri] + 1;
          if (d2 < ri_ * ri_) e = 16'h7BFF;           // blue lightened
          else if (d2 <= ro * ro) e = RGB_BLUE;
          else e = RGB_WHITE;
          check(pixel == e, $sformatf("r %0d (%0d,%0d) pixel %h expected %h", rs[ri], h, v, pixel, e));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
