// tb_visualizer: for several sets of bucket values, all four pictures are
// compared pixel by pixel (a grid over the 360x243 screen) with a reference
// drawing made here from the bucket sizes. With all bars below the launch
// threshold each ball must sit at its bar tip (3/4 of the bar length along
// the diagonal). Then one bar is raised above the threshold: its ball must
// be released, fly up and right on ticks, and come back to its bar tip
// after leaving the screen.
module tb_visualizer;
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, tick;
  logic [7:0][15:0] bucket;
  logic [9:0] row, col;
  rgb565_t [3:0] vis;
  logic [7:0] ball_flying;
  visualizer dut (.clk, .rst, .tick, .bucket, .row, .col, .vis, .ball_flying);
  // Reference picture, computed pixel by pixel from the bucket sizes:
  // mode 0 vertical bars, mode 1 diagonal bars and balls, mode 2 radial
  // sectors, mode 3 circle lenses. Ball centres are passed in.
  localparam logic [15:0] M_PAL [8] = '{16'hF800, 16'hFC00, 16'hFFE0, 16'h07E0, 16'h07FF, 16'h001F, 16'h801F, 16'hF81F};
  localparam int M_CX [8] = '{180, 150, 210, 120, 240, 150, 210, 180};
  localparam int M_CY [8] = '{ 61,  91,  91, 121, 121, 151, 151, 181};
  localparam logic [15:0] M_CC [8] = '{16'hF800, 16'h001F, 16'h001F, 16'h07E0, 16'h07E0, 16'h001F, 16'h001F, 16'hF800};

  function automatic logic [15:0] model_pixel(input int mode, input int row, input int col,
                                               input int size [8], input int bx [8], input int by [8]);
    logic [15:0] acc;
    acc = (mode >= 2) ? 16'hFFFF : 16'h0000;
    for (int i = 0; i < 8; i++) begin
      int s, d, ex, ey, d2, rin, rout;
      bit in_sec;
      s = size[i] > 255 ? 255 : size[i];
      case (mode)
        0: if (col >= 40 * (i + 1) && col < 40 * (i + 1) + 30 && row <= 242 && row > 242 - s) acc |= M_PAL[i];
        1: begin
          d = col + row - (15 * i + 242);
          if (d >= -5 && d <= 5 && (col - 15 * i) ** 2 + (row - 242) ** 2 <= s * s) acc |= M_PAL[i];
          if ((col - bx[i]) ** 2 + (row - by[i]) ** 2 <= 25) acc |= 16'hFFFF;
        end
        2: begin
          ex = col - 180; ey = 121 - row;
          case (i)
            0: in_sec = ex >= 0 && ey >= 0 && ex >= ey;
            1: in_sec = ex >= 0 && ey >= 0 && ey >= ex;
            2: in_sec = ex <= 0 && ey >= 0 && ey >= -ex;
            3: in_sec = ex <= 0 && ey >= 0 && -ex >= ey;
            4: in_sec = ex <= 0 && ey <= 0 && -ex >= -ey;
            5: in_sec = ex <= 0 && ey <= 0 && -ey >= -ex;
            6: in_sec = ex >= 0 && ey <= 0 && -ey >= ex;
            default: in_sec = ex >= 0 && ey <= 0 && ex >= -ey;
          endcase
          if (!(in_sec && ex * ex + ey * ey <= s * s)) acc &= 16'hFFFF;
          else acc &= M_PAL[i];
        end
        default: begin
          d2 = (col - M_CX[i]) ** 2 + (row - M_CY[i]) ** 2;
          rin = s == 0 ? 0 : s - 1; rout = s + 1;
          if (d2 < rin * rin) acc &= M_CC[i] | 16'h7BEF;
          else if (d2 <= rout * rout) acc &= M_CC[i];
        end
      endcase
    end
    return acc;
  endfunction

  task automatic compare_all(input int size [8], input int bx [8], input int by [8]);
    for (int r = 0; r < 243; r += 3)
      for (int c = 0; c < 360; c += 3) begin
        row = 10'(r); col = 10'(c); #1;
        for (int m = 0; m < 4; m++)
          check(vis[m] == model_pixel(m, r, c, size, bx, by),
                $sformatf("mode %0d pixel (%0d,%0d) %h expected %h", m, c, r, vis[m], model_pixel(m, r, c, size, bx, by)));
      end
  endtask

  initial begin
    int size [8], bx [8], by [8];
    rst = 1; tick = 0; bucket = '0; row = 0; col = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < 8; i++) begin
        size[i] = (t == 0) ? 0 : (t == 1) ? 190 : $urandom % 193;
        if (t == 3 && i == 2) size[i] = 192;
        bucket[i] = 16'(size[i]);
        bx[i] = 15 * i + (size[i] / 2 + size[i] / 4);
        by[i] = 242 - (size[i] / 2 + size[i] / 4);
      end
      @(negedge clk); @(negedge clk);
      check(ball_flying == 0, "ball released below the threshold");
      compare_all(size, bx, by);
    end
    // launch the ball of bucket 5
    bucket[5] = 16'd1000;   // saturates at 255
    @(negedge clk);
    check(ball_flying == 8'b0010_0000, "ball 5 not released");
    bucket[5] = 16'd100;
    size[5] = 100;
    bx[5] = 75 + 190; by[5] = 242 - 190;
    for (int k = 0; k < 3; k++) begin
      tick = 1; @(negedge clk); tick = 0; @(negedge clk);
    end
    bx[5] += 9; by[5] += -8 - 7 - 6;
    compare_all(size, bx, by);
    for (int k = 0; k < 200 && ball_flying[5]; k++) begin
      tick = 1; @(negedge clk); tick = 0; @(negedge clk);
    end
    check(ball_flying == 0, "ball did not come back");
    @(negedge clk);
    bx[5] = 75 + 75; by[5] = 242 - 75;
    compare_all(size, bx, by);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
