// tb_rgb2ycrcb: every one of the 65536 RGB565 colours is converted and
// compared with a real-number model of
//   Y = 0.299R + 0.587G + 0.114B,  Cr = 0.713(R-Y)+128,  Cb = 0.564(B-Y)+128
// on 8-bit components, scaled to 10 bits. Y must be within 1 step of the
// real value and Cr/Cb within 2 (fixed-point coefficients and truncation).
module tb_rgb2ycrcb;
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
  rgb565_t pixel;
  ycrcb_t ycc;
  rgb2ycrcb dut (.pixel, .ycc);
  initial begin
    for (int p = 0; p < 65536; p++) begin
      real r, g, b, y, cr, cb;
      pixel = 16'(p); #1;
      r = (p >> 11) * 8; g = ((p >> 5) & 63) * 4; b = (p & 31) * 8;
      y = 0.299 * r + 0.587 * g + 0.114 * b;
      cr = 0.713 * (r - y) + 128.0; cb = 0.564 * (b - y) + 128.0;
      if (cr > 255) cr = 255; if (cr < 0) cr = 0;
      if (cb > 255) cb = 255; if (cb < 0) cb = 0;
      check(ycc.y[1:0] == 0 && ycc.cr[1:0] == 0 && ycc.cb[1:0] == 0, "low bits not zero");
      check(real'(ycc.y >> 2) > y - 1.5 && real'(ycc.y >> 2) < y + 1.0, $sformatf("%h: Y %0d model %f", p, ycc.y >> 2, y));
      check(real'(ycc.cr >> 2) > cr - 2.5 && real'(ycc.cr >> 2) < cr + 2.5, $sformatf("%h: Cr %0d model %f", p, ycc.cr >> 2, cr));
      check(real'(ycc.cb >> 2) > cb - 2.5 && real'(ycc.cb >> 2) < cb + 2.5, $sformatf("%h: Cb %0d model %f", p, ycc.cb >> 2, cb));
    end
    pixel = 16'hFFFF; #1;
    check(ycc.y >= 10'd980 && ycc.cr >= 10'd500 && ycc.cr <= 10'd520 && ycc.cb >= 10'd500 && ycc.cb <= 10'd520, "white");
    pixel = 16'h0000; #1;
    check(ycc.y == 0 && ycc.cr == 10'd512 && ycc.cb == 10'd512, "black");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
