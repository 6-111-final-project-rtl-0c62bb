// debounce: cleans a bouncing push-button level.
//
// The output follows the input only after the input has held the same value
// for STABLE_CYCLES consecutive clocks (10 ms at 27 MHz by default). Any
// change restarts the count. At reset the output takes the input directly.
// The design uses it on the enter button that chooses the headphone source;
// the 10 ms window is this implementation's choice.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 270_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic [CW-1:0] count;
  logic          last;

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      last  <= noisy;
      clean <= noisy;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
