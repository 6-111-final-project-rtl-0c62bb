// tb_radial_segment: for all eight sectors and two radii, each pixel of a
// window around the centre must take the sector colour exactly when its
// angle (atan2, y up) lies in [45k, 45k+45] degrees and it is within the
// radius; white otherwise. Pixels on a sector edge are accepted either way.
module tb_radial_segment;
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
  logic [9:0] hcount, vcount, radius;
  rgb565_t pixel [8];
  for (genvar k = 0; k < 8; k++) begin : g
    radial_segment #(.X(180), .Y(121), .SEGMENT(k), .COLOR(RGB_RED)) dut (.hcount, .vcount, .radius, .pixel(pixel[k]));
  end
  initial begin
    int rs [2] = '{30, 100};
    foreach (rs[ri]) begin
      radius = 10'(rs[ri]);
      for (int v = 121 - 110; v <= 121 + 110; v += 3)
        for (int h = 180 - 110; h <= 180 + 110; h += 3) begin
          int ex, ey;
          real ang;
          hcount = 10'(h); vcount = 10'(v); #1;
          ex = h - 180; ey = 121 - v;
          ang = (ex == 0 && ey == 0) ? 0.0 : $atan2(real'(ey), real'(ex)) * 180.0 / 3.14159265358979;
          if (ang < 0) ang += 360.0;
          for (int k = 0; k < 8; k++) begin
            bit in_r, edge_a, lit;
            in_r = ex * ex + ey * ey <= rs[ri] * rs[ri];
            edge_a = (ex == 0 || ey == 0 || ex == ey || ex == -ey);
            lit = in_r && ang >= 45.0 * k && ang <= 45.0 * (k + 1);
            if (!edge_a)
              check(pixel[k] == (lit ? RGB_RED : RGB_WHITE), $sformatf("sector %0d r %0d (%0d,%0d)", k, rs[ri], h, v));
            else if (!in_r)
              check(pixel[k] == RGB_WHITE, "edge pixel outside the radius lit");
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
