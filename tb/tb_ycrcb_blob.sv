// tb_ycrcb_blob: a 40-wide bar standing on row 320 with a height of
// coefficient/2. Pixels outside must be zero; inside, the fill colour, or,
// with the outline on, the bright colour on the 2-pixel border.
module tb_ycrcb_blob;
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
  logic [9:0] hcount, vcount;
  logic outline;
  logic [7:0] height_in;
  ycrcb_t ycc;
  ycrcb_blob #(.X(300), .Y(320)) dut (.hcount, .vcount, .outline, .height_in, .ycc);
  initial begin
    int hs [4] = '{0, 1, 60, 255};
    foreach (hs[k]) for (int o = 0; o < 2; o++) begin
      height_in = 8'(hs[k]); outline = o[0];
      for (int v = 180; v < 330; v++)
        for (int h = 295; h < 345; h++) begin
          int ht;
          bit in_b, bord;
          ycrcb_t e;
          hcount = 10'(h); vcount = 10'(v); #1;
          ht = hs[k] / 2;
          in_b = h >= 300 && h < 340 && v <= 320 && v > 320 - ht;
          bord = h < 302 || h >= 338 || v > 318 || v < 323 - ht;
          if (!in_b) e = '0;
          else if (o == 1 && bord) e = '{y: 940, cr: 512, cb: 512};
          else e = '{y: 480, cr: 512, cb: 512};
          check(ycc == e, $sformatf("h %0d o %0d (%0d,%0d)", hs[k], o, h, v));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
