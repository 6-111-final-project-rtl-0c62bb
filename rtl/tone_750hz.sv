// tone_750hz: 20-bit signed 750 Hz sine test tone for the headphone output.
//
// At the 48 kHz audio sample rate one period of 750 Hz is exactly 64 samples,
// so the tone is a 64-step phase counter that advances on every `step` pulse
// (one per audio sample) and looks up a sine table. The table holds one half
// period (32 entries); the second half is its negative. The table is computed
// at elaboration with the rational sine approximation
//     sin(pi*p/32) ~= 4p(32-p) / (1280 - p(32-p)),   p = 0..31,
// scaled to the 20-bit full scale (2^19 - 1). Its error is below 0.2 %.
// The test tone, its 20-bit width and 750 Hz come from the design description;
// the table method is this implementation's choice.
//
// Interface: clk, rst (sync, active high), step (advance one sample),
//            tone (signed sample, registered, valid the cycle after step).
module tone_750hz (
  input  logic               clk,
  input  logic               rst,
  input  logic               step,
  output logic signed [19:0] tone
);
  typedef logic [18:0] half_wave_t [32];

  function automatic half_wave_t make_half_wave();
    half_wave_t t;
    for (longint p = 0; p < 32; p++) begin
      longint num, den;
      num = 4 * p * (32 - p) * ((longint'(1) << 19) - 1);
      den = 1280 - p * (32 - p);
      t[p] = 19'(num / den);
    end
    return t;
  endfunction

  localparam half_wave_t HALF_WAVE = make_half_wave();

  logic [5:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      tone  <= '0;
    end else if (step) begin
      phase <= phase + 6'd1;
      tone  <= phase[5] ? -$signed({1'b0, HALF_WAVE[phase[4:0]]})
                        :  $signed({1'b0, HALF_WAVE[phase[4:0]]});
    end
  end
endmodule
