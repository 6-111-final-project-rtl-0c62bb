// ps2_ascii: PS/2 key presses as ASCII characters.
//
// Bytes from ps2_rx are read as soon as they arrive. A keyboard sends a
// make code when a key goes down and F0 followed by the same code when it
// comes up; extended keys start with E0. A byte is reported as a key press
// only when neither it nor the byte before it has bit 7 set, which drops
// the F0/E0 prefixes and the code after an F0. For a reported key, `ascii`
// takes the character of its scan code (set 2: letters as capitals, digits,
// Enter as 0x0D, space, backspace; '#' for any other key), `keycode` the raw
// code, and ascii_ready pulses for one clock. The keyboard's own repeat sends
// repeated make codes, which are reported as repeated presses. Conversion to
// ASCII with a one-cycle ready pulse follows the design description; the
// decoding rule and the table are this implementation's.
module ps2_ascii (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  output logic [7:0] ascii,
  output logic [7:0] keycode,
  output logic       ascii_ready
);
  logic [7:0] fifo_data;
  logic       fifo_empty, fifo_overflow;
  logic [7:0] prev;

  ps2_rx u_rx (
    .clk, .rst, .ps2_clk, .ps2_data, .rd(!fifo_empty),
    .data(fifo_data), .empty(fifo_empty), .overflow(fifo_overflow));

  function automatic logic [7:0] to_ascii(input logic [7:0] code);
    unique case (code)
      8'h1C: return "A";  8'h32: return "B";  8'h21: return "C";  8'h23: return "D";
      8'h24: return "E";  8'h2B: return "F";  8'h34: return "G";  8'h33: return "H";
      8'h43: return "I";  8'h3B: return "J";  8'h42: return "K";  8'h4B: return "L";
      8'h3A: return "M";  8'h31: return "N";  8'h44: return "O";  8'h4D: return "P";
      8'h15: return "Q";  8'h2D: return "R";  8'h1B: return "S";  8'h2C: return "T";
      8'h3C: return "U";  8'h2A: return "V";  8'h1D: return "W";  8'h22: return "X";
      8'h35: return "Y";  8'h1A: return "Z";
      8'h45: return "0";  8'h16: return "1";  8'h1E: return "2";  8'h26: return "3";
      8'h25: return "4";  8'h2E: return "5";  8'h36: return "6";  8'h3D: return "7";
      8'h3E: return "8";  8'h46: return "9";
      8'h29: return " ";
      8'h5A: return 8'h0D;   // Enter
      8'h66: return 8'h08;   // Backspace
      default: return "#";
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      prev        <= '0;
      ascii       <= '0;
      keycode     <= '0;
      ascii_ready <= 1'b0;
    end else begin
      ascii_ready <= 1'b0;
      if (!fifo_empty) begin
        prev <= fifo_data;
        if (!fifo_data[7] && !prev[7]) begin
          ascii       <= to_ascii(fifo_data);
          keycode     <= fifo_data;
          ascii_ready <= 1'b1;
        end
      end
    end
  end
endmodule
