// tb_visualizer_layer: feeds eight bucket magnitudes repeatedly, with
// frame_done pulses so the smoothed values settle, then plays row_done for
// every line of both fields of a frame (vcount 0..485) with the line gaps of
// the video timing. Every write is captured into a frame kept here; at the
// end each of the 87480 pixels must have been written and must equal the
// reference drawing of the selected picture for the smoothed bucket values,
// at address row*360+col.
module tb_visualizer_layer;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic rst, bkt_valid, row_done, frame_done, we;
  logic [15:0] bkt_mag;
  logic [2:0] bkt_index;
  logic [9:0] vcount;
  logic [1:0] sel;
  logic [16:0] addr;
  rgb565_t rgb_data;
  logic [7:0][15:0] bucket;
  logic [7:0] ball_flying;
  visualizer_layer #(.TICK_DIVIDE(1000)) dut (.clk, .rst, .bkt_mag, .bkt_index, .bkt_valid, .row_done,
      .frame_done, .vcount, .sel, .we, .addr, .rgb_data, .bucket, .ball_flying);
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

  logic [15:0] frame [FB_DEPTH];
  bit written [FB_DEPTH];
  int n_writes = 0;
  always @(posedge clk) if (!rst && we) begin
    if (addr < 17'(FB_DEPTH)) begin frame[addr] = rgb_data; written[addr] = 1; end
    n_writes++;
  end

  initial begin
    int mags [8] = '{20, 160, 60, 120, 5, 150, 90, 40};
    rst = 1; bkt_valid = 0; bkt_mag = 0; bkt_index = 0; row_done = 0; frame_done = 0; vcount = 0; sel = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int s = 0; s < 4; s++) begin
      int size [8], bx [8], by [8], bad;
      sel = 2'(s);
      for (int f = 0; f < 12; f++) begin
        for (int i = 0; i < 8; i++) begin
          bkt_valid = 1; bkt_index = 3'(i); bkt_mag = 16'(mags[i] + 8 * s);
          @(negedge clk);
        end
        bkt_valid = 0;
        frame_done = 1; @(negedge clk); frame_done = 0;
      end
      foreach (written[a]) written[a] = 0;
      n_writes = 0;
      for (int v = 0; v < 486; v++) begin
        vcount = 10'(v);
        row_done = 1; @(negedge clk); row_done = 0;
        vcount = 10'($urandom);
        repeat (400) @(negedge clk);
      end
      check(n_writes == 486 * 360, $sformatf("%0d writes in a frame", n_writes));
      for (int i = 0; i < 8; i++) begin
        size[i] = int'(bucket[i]);
        bx[i] = 15 * i + (size[i] / 2 + size[i] / 4);
        by[i] = 242 - (size[i] / 2 + size[i] / 4);
      end
      check(ball_flying == 0, "ball released");
      bad = 0;
      for (int r = 0; r < 243; r++)
        for (int c = 0; c < 360; c++) begin
          bit ok;
          ok = written[r * 360 + c] && frame[r * 360 + c] == model_pixel(s, r, c, size, bx, by);
          check(ok, $sformatf("picture %0d pixel (%0d,%0d)", s, c, r));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
