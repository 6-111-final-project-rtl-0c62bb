// tb_equalizer: drives random key commands and keeps a model of the eight
// working coefficients, the selected bucket and the committed bank
// (left/right wrap, up +32 saturating at 255, down -32 stopping at 1, enter
// commits, nothing happens while disabled). Checks the committed bank and
// the coefficient lookup every clock, and at the end scans the screen: with
// the overlay enabled, pixels of the bars must carry bar colours and all
// others the incoming video; with it disabled all pixels the incoming video.
module tb_equalizer;
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
  logic rst, enable, left, right, up, down, enter;
  ycrcb_t ycc_in, ycc_out;
  logic [9:0] h_position, v_position;
  logic [2:0] coeff_ind, bucket;
  logic [7:0] coeff;
  logic [7:0][7:0] coeffs;
  equalizer dut (.clk, .rst, .enable, .left, .right, .up, .down, .enter, .ycc_in, .h_position,
                 .v_position, .coeff_ind, .ycc_out, .coeff, .coeffs, .bucket);
  int temp [8], bank [8], sel;
  initial begin
    rst = 1; enable = 0; {left, right, up, down, enter} = 0; ycc_in = '0;
    h_position = 0; v_position = 0; coeff_ind = 0;
    foreach (temp[i]) begin temp[i] = 255; bank[i] = 255; end
    sel = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 3000; c++) begin
      int k;
      enable = ($urandom % 8) != 0;
      k = $urandom % 6;
      {left, right, up, down, enter} = 0;
      case (k)
        0: left = 1;
        1: right = 1;
        2: up = 1;
        3: down = 1;
        4: enter = ($urandom % 4) == 0;
        default: ;
      endcase
      coeff_ind = 3'($urandom);
      @(negedge clk);
      if (enable) begin
        if (enter) bank = temp;
        else if (left) sel = (sel + 7) % 8;
        else if (right) sel = (sel + 1) % 8;
        else if (up) temp[sel] = (temp[sel] + 32 > 255) ? 255 : temp[sel] + 32;
        else if (down) temp[sel] = (temp[sel] > 32) ? temp[sel] - 32 : 1;
      end
      check(int'(bucket) == sel, "selected bucket");
      foreach (bank[i]) check(int'(coeffs[i]) == bank[i], $sformatf("clock %0d coefficient %0d = %0d, expected %0d", c, i, coeffs[i], bank[i]));
      check(int'(coeff) == bank[coeff_ind], "coefficient lookup");
    end
    {left, right, up, down, enter} = 0;
    for (int en = 0; en < 2; en++) begin
      enable = en[0];
      for (int v = 150; v < 330; v += 2)
        for (int h = 190; h < 600; h += 3) begin
          bit in_b;
          h_position = 10'(h); v_position = 10'(v);
          ycc_in = '{y: 10'($urandom), cr: 10'($urandom), cb: 10'($urandom)};
          #1;
          in_b = 0;
          for (int i = 0; i < 8; i++)
            if (h >= 200 + 50 * i && h < 240 + 50 * i && v <= 320 && v > 320 - temp[i] / 2) in_b = 1;
          if (en && in_b) check(ycc_out.cr == 512 && ycc_out.cb == 512 && (ycc_out.y == 480 || ycc_out.y == 940),
                                $sformatf("bar pixel (%0d,%0d)", h, v));
          else check(ycc_out == ycc_in, $sformatf("video pixel (%0d,%0d) en %0d", h, v, en));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
