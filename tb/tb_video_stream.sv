// tb_video_stream: runs the full-size NTSC line/field timing for two frames
// and checks the stream at the output pins with a decoder of its own:
// - every timing code is 3FC 000 000 XY with correct protection bits in XY,
//   an EAV (H=1) ending each 1440-word active part and an SAV (H=0) four
//   words before the next line, 1716 words per line, 525 lines per frame;
// - F and V per line follow the 525-line field layout (V=0 on lines 19-261
//   and 282-524 counted from 0, F=1 from line 272 to line 8);
// - blanking words alternate 200/040;
// - active words are Cb Y Cr Y of the pixel at (sample/2, line position),
//   where the testbench feeds a pixel colour computed from the position;
// - h_next/v_next predict the next clock's position, and row_done and
//   frame_done come once per line and once per frame, just before EAV.
module tb_video_stream;
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
  logic rst, row_done, frame_done, timing_code;
  ycrcb_t ycc_in;
  logic [9:0] ycrcb, h_position, v_position, h_next, v_next;

  video_stream dut (.clk, .rst, .ycc_in, .ycrcb, .h_position, .v_position, .h_next, .v_next,
                    .row_done, .frame_done, .timing_code);

  // pixel colour as a function of the position
  assign ycc_in = '{y: 10'(h_position + v_position), cr: v_position, cb: h_position ^ 10'h155};

  int clocks = 0, last_frame = 0;
  int line_len, line_no, lines_in_frame, active_words, frames, rows, eavs, savs;
  int fld_line [2];
  logic [9:0] w1, w2, w3;
  bit started, in_active, v_bit, f_bit;
  logic [9:0] ph, pv;
  bit prev_row_done, prev_frame_done;

  initial begin
    rst = 1;
    started = 0; line_len = 0; line_no = 0; lines_in_frame = 0; frames = 0; rows = 0;
    eavs = 0; savs = 0; w1 = 0; w2 = 0; w3 = 0; in_active = 0;
    repeat (4) @(negedge clk);
    rst = 0;
  end

  always @(posedge clk) if (!rst) begin
    // position lookahead
    if (started) check(h_position == ph && v_position == pv, "h_next/v_next did not predict the position");
    ph = h_next; pv = v_next;
    started = 1;
  end

  always @(negedge clk) if (!rst && started) begin
    line_len++;
    if (prev_row_done) begin
      check(ycrcb == 10'h3FC, "row_done not followed by EAV");
      rows++;
    end
    if (prev_frame_done) begin
      check(line_no == 524, $sformatf("frame_done on line %0d", line_no));
      if (frames > 0) check(clocks - last_frame == 900900, "frame length");
      last_frame = clocks;
      frames++;
    end
    clocks++;
    prev_row_done = row_done;
    prev_frame_done = frame_done;
    if (w3 == 10'h3FC && w2 == 10'h000 && w1 == 10'h000) begin
      bit f, v, h;
      f = ycrcb[8]; v = ycrcb[7]; h = ycrcb[6];
      check(ycrcb[9] && ycrcb[1:0] == 0 && ycrcb[5:2] == {v ^ h, f ^ h, f ^ v, f ^ v ^ h},
            $sformatf("bad XY %h", ycrcb));
      check(timing_code, "timing_code low on XY");
      if (h) begin
        eavs++;
        if (in_active) check(active_words == 1440 + 3, $sformatf("active part %0d words", active_words - 3));
        in_active = 0;
      end else begin
        savs++;
        if (savs > 1) begin
          check(line_len == 1716, $sformatf("line %0d has %0d words", line_no, line_len));
          line_no = (line_no + 1) % 525;
        end else begin
          line_no = 1;   // reset starts on line 0; its SAV opens line 1
        end
        line_len = 0;
        check(v == !((line_no >= 19 && line_no <= 261) || (line_no >= 282)), $sformatf("V wrong on line %0d", line_no));
        check(f == (line_no >= 272 || line_no < 9), $sformatf("F wrong on line %0d", line_no));
        in_active = 1; active_words = 0; v_bit = v;
      end
    end else if (in_active) begin
      int s, vv;
      ycrcb_t e;
      logic [9:0] want;
      s = active_words;
      active_words++;
      if (s < 1440) begin
        if (v_bit) want = s[0] ? 10'h040 : 10'h200;
        else begin
          vv = (line_no <= 261) ? 2 * (line_no - 19) : 2 * (line_no - 282) + 1;
          e = '{y: 10'(s / 2 + vv), cr: 10'(vv), cb: 10'(s / 2) ^ 10'h155};
          case (s % 4)
            0: want = e.cb;
            1, 3: want = e.y;
            default: want = e.cr;
          endcase
        end
        check(ycrcb == want, $sformatf("line %0d word %0d is %h, expected %h", line_no, s, ycrcb, want));
      end
    end else if (savs > 0 && !(ycrcb == 10'h3FC || (w1 == 10'h3FC) || (w2 == 10'h3FC && w1 == 0))) begin
      check(ycrcb == (line_len[0] ? 10'h040 : 10'h200) || ycrcb == 10'h040 || ycrcb == 10'h200, "blanking word");
      check(ycrcb != w1, "blanking words do not alternate");
    end
    w3 = w2; w2 = w1; w1 = ycrcb;
    if (frames == 2) begin
      check(rows == 2 * 525 + 1 || rows == 2 * 525, $sformatf("%0d row_done pulses", rows));
      check(savs >= 1049, $sformatf("%0d SAVs", savs));
      check(eavs >= 1049, $sformatf("%0d EAVs", eavs));
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
    end
  end

endmodule
