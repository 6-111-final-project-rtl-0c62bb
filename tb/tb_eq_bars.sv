// tb_eq_bars: eight bars with random heights; every pixel of the bar area
// must be the grey bar colour inside bar i (columns 200+50i .. +39, rows
// 321-h/2 .. 320), bright on the border of the selected bar only, and zero
// between and above bars.
module tb_eq_bars;
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
  logic [2:0] selected;
  logic [7:0][7:0] height;
  logic [9:0] hcount, vcount;
  ycrcb_t ycc;
  eq_bars dut (.selected, .height, .hcount, .vcount, .ycc);
  initial begin
    for (int t = 0; t < 3; t++) begin
      foreach (height[i]) height[i] = (t == 0) ? 8'hFF : 8'($urandom);
      selected = 3'($urandom);
      for (int v = 150; v < 330; v += 1)
        for (int h = 190; h < 600; h += 3) begin
          ycrcb_t e;
          hcount = 10'(h); vcount = 10'(v); #1;
          e = '0;
          for (int i = 0; i < 8; i++) begin
            int x0, ht;
            x0 = 200 + 50 * i; ht = height[i] / 2;
            if (h >= x0 && h < x0 + 40 && v <= 320 && v > 320 - ht) begin
              if (i == int'(selected) && (h < x0 + 2 || h >= x0 + 38 || v > 318 || v < 323 - ht))
                e = '{y: 940, cr: 512, cb: 512};
              else
                e = '{y: 480, cr: 512, cb: 512};
            end
          end
          check(ycc == e, $sformatf("(%0d,%0d) sel %0d", h, v, selected));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
