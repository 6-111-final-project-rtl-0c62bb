// bucketizer: turns the 1024-bin FFT output stream into 8 frequency buckets.
//
// For every new FFT output bin (dv high and xk_index different from the last
// bin taken) the top 8 bits of the real and imaginary parts are squared as
// signed numbers and added, giving the bin's squared magnitude. The squares of
// 128 consecutive bins (xk_index[9:7] names the bucket) are accumulated; when
// bin 127 of a bucket arrives the sum is divided by 128 (shift right by 7) and
// presented as bkt_mag with its bucket number on bkt_index, and bkt_valid
// pulses for one cycle. The squaring, the 8-bit truncation, 128 bins per
// bucket, the divide by 128 and the "only when the index changed" rule follow
// the design description. The FFT streams its output slowly (its clock enable
// is the 48 kHz sample strobe), so one bin stays on the bus for many clocks;
// the index check makes each bin count once.
//
// This implementation's choices: the squares are registered once (one cycle of
// latency, as the multiplier cores had), the accumulator is 23 bits wide so a
// full bucket cannot overflow, the bucket number is taken from the index bits
// rather than from a separate counter, and bkt_valid is a single-cycle pulse.
//
// Timing: bkt_mag/bkt_index/bkt_valid appear 2 clocks after the last bin of
// a bucket is presented.
module bucketizer (
  input  logic               clk,
  input  logic               rst,
  input  logic               dv,          // FFT output valid
  input  logic signed [18:0] xk_re,
  input  logic signed [18:0] xk_im,
  input  logic        [9:0]  xk_index,    // output bin number 0..1023
  output logic        [16:0] bkt_mag,     // average squared magnitude
  output logic        [2:0]  bkt_index,   // bucket 0..7
  output logic               bkt_valid    // one-cycle pulse per new bucket
);
  // stage 1: squares of the top 8 bits
  logic signed [7:0] re8, im8;
  assign re8 = xk_re[18:11];
  assign im8 = xk_im[18:11];

  logic        [9:0]  last_index;
  logic               have_last;
  logic               s1_valid;
  logic        [9:0]  s1_index;
  logic        [15:0] s1_mag;       // re^2 + im^2 <= 2 * 128^2 = 32768

  logic signed [15:0] sq_re, sq_im;
  assign sq_re = re8 * re8;
  assign sq_im = im8 * im8;

  logic new_bin;
  assign new_bin = dv && (!have_last || xk_index != last_index);

  always_ff @(posedge clk) begin
    if (rst) begin
      have_last  <= 1'b0;
      last_index <= '0;
      s1_valid   <= 1'b0;
      s1_index   <= '0;
      s1_mag     <= '0;
    end else begin
      s1_valid <= new_bin;
      if (new_bin) begin
        have_last  <= 1'b1;
        last_index <= xk_index;
        s1_index   <= xk_index;
        s1_mag     <= 16'(sq_re) + 16'(sq_im);
      end
    end
  end

  // stage 2: accumulate 128 bins, then average
  logic [22:0] acc;
  logic [22:0] total;
  assign total = acc + 23'(s1_mag);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc       <= '0;
      bkt_mag   <= '0;
      bkt_index <= '0;
      bkt_valid <= 1'b0;
    end else begin
      bkt_valid <= 1'b0;
      if (s1_valid) begin
        if (s1_index[6:0] == 7'd127) begin
          bkt_mag   <= 17'(total >> 7);
          bkt_index <= s1_index[9:7];
          bkt_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= total;
        end
      end
    end
  end
endmodule
