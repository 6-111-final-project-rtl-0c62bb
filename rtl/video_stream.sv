// video_stream: NTSC CCIR-656 (ITU-R BT.656) stream for the ADV7194 encoder.
//
// A sample counter (0..1715) and a line counter (0..524) scan the 525-line
// NTSC frame at 27 MHz. Each line is:
//   samples 0..1439    active video, 720 pixels in 4:2:2 order Cb Y Cr Y
//   samples 1440..1443 EAV code 3FC 000 000 XY   (8-bit FF 00 00 XY, << 2)
//   samples 1444..1711 horizontal blanking, 0x200 / 0x040 alternately
//   samples 1712..1715 SAV code 3FC 000 000 XY, whose F and V bits are those
//                      of the line that follows (the SAV opens that line)
// XY = {1, F, V, H, V^H, F^H, F^V, F^V^H} << 2. Field 1 carries the even
// picture lines (lines 19..261), field 2 the odd ones (lines 282..524); lines
// outside them are vertical blanking (V = 1) and carry blanking levels.
// The sample counts (1440 active, 268 blanking, 4+4 timing codes), the code
// values, the 4:2:2 order, even-rows-first interlace and the single-clock
// row_done / frame_done pulses follow the design description and its timing
// diagram. This implementation sends blanking levels on vertical-blanking
// lines and names the exact field boundary lines.
//
// Positions: h_position 0..719 (pixel of the current sample, 0 outside the
// active part), v_position 0..485 (picture line of the current line, 0 on
// blanking lines). h_next/v_next are the same for the next sample; a frame
// buffer with one clock of read latency is addressed with them so that its
// data arrives together with the sample that needs it (ycc_in is taken in
// the same cycle).
// Pulses: row_done at sample 1440 of every line (the active part just
// ended), frame_done on the very last sample of the frame.
// ycrcb is registered: the word for sample s appears in the cycle after s.
module video_stream
  import avs_pkg::*;
#(
  parameter int unsigned SAMPLES  = 1716,
  parameter int unsigned ACTIVE   = 1440,
  parameter int unsigned LINES    = 525,
  parameter int unsigned F1_FIRST = 19,
  parameter int unsigned F1_LAST  = 261,
  parameter int unsigned F2_FIRST = 282,
  parameter int unsigned F2_LAST  = 524,
  parameter int unsigned F_RISE   = 272,   // F = 1 from this line ...
  parameter int unsigned F_FALL   = 9      // ... up to, not including, this line
) (
  input  logic       clk,
  input  logic       rst,
  input  ycrcb_t     ycc_in,
  output logic [9:0] ycrcb,
  output logic [9:0] h_position,
  output logic [9:0] v_position,
  output logic [9:0] h_next,
  output logic [9:0] v_next,
  output logic       row_done,
  output logic       frame_done,
  output logic       timing_code   // 1 while ycrcb carries an EAV/SAV word
);
  logic [10:0] sample;
  logic [9:0]  line;
  logic [10:0] sample_n;
  logic [9:0]  line_n;

  typedef struct packed {
    logic [9:0] h;
    logic [9:0] v;
  } pos_t;

  function automatic logic active_line(input logic [9:0] l);
    return (l >= 10'(F1_FIRST) && l <= 10'(F1_LAST)) ||
           (l >= 10'(F2_FIRST) && l <= 10'(F2_LAST));
  endfunction

  function automatic pos_t position(input logic [10:0] s, input logic [9:0] l);
    pos_t p;
    p.h = (s < 11'(ACTIVE) && active_line(l)) ? s[10:1] : 10'd0;
    if (l >= 10'(F1_FIRST) && l <= 10'(F1_LAST))      p.v = 10'((l - 10'(F1_FIRST)) << 1);
    else if (l >= 10'(F2_FIRST) && l <= 10'(F2_LAST)) p.v = 10'(((l - 10'(F2_FIRST)) << 1) | 10'd1);
    else                                              p.v = 10'd0;
    return p;
  endfunction

  assign sample_n = (sample == 11'(SAMPLES - 1)) ? 11'd0 : sample + 11'd1;
  assign line_n   = (sample != 11'(SAMPLES - 1)) ? line :
                    (line == 10'(LINES - 1)) ? 10'd0 : line + 10'd1;

  pos_t cur, nxt;
  assign cur        = position(sample, line);
  assign nxt        = position(sample_n, line_n);
  assign h_position = cur.h;
  assign v_position = cur.v;
  assign h_next     = nxt.h;
  assign v_next     = nxt.v;

  assign row_done   = (sample == 11'(ACTIVE));
  assign frame_done = (sample == 11'(SAMPLES - 1)) && (line == 10'(LINES - 1));

  // timing reference bits
  // The SAV at the end of a line belongs to the line that follows it, so the
  // timing code takes F and V from the next line there.
  logic       f, v, h;
  logic [7:0] xy;
  logic [9:0] code_line;
  assign code_line = (sample < 11'(SAMPLES - 4)) ? line :
                     (line == 10'(LINES - 1)) ? 10'd0 : line + 10'd1;
  assign f  = (code_line >= 10'(F_RISE)) || (code_line < 10'(F_FALL));
  assign v  = !active_line(code_line);
  assign h  = (sample >= 11'(ACTIVE)) && (sample < 11'(SAMPLES - 1));
  assign xy = {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h};

  always_ff @(posedge clk) begin
    if (rst) begin
      sample      <= '0;
      line        <= '0;
      ycrcb       <= 10'h040;
      timing_code <= 1'b0;
    end else begin
      sample      <= sample_n;
      line        <= line_n;
      timing_code <= 1'b0;
      if (sample < 11'(ACTIVE)) begin
        if (!active_line(line)) begin
          ycrcb <= sample[0] ? 10'h040 : 10'h200;
        end else begin
          unique case (sample[1:0])
            2'd0: ycrcb <= ycc_in.cb;
            2'd1: ycrcb <= ycc_in.y;
            2'd2: ycrcb <= ycc_in.cr;
            2'd3: ycrcb <= ycc_in.y;
          endcase
        end
      end else if (sample < 11'(ACTIVE + 4) || sample >= 11'(SAMPLES - 4)) begin
        timing_code <= 1'b1;
        unique case (sample[1:0])
          2'd0: ycrcb <= 10'h3FC;
          2'd1, 2'd2: ycrcb <= 10'h000;
          2'd3: ycrcb <= {xy, 2'b00};
        endcase
      end else begin
        ycrcb <= sample[0] ? 10'h040 : 10'h200;
      end
    end
  end
endmodule
