// key_decode: keyboard characters to equalizer commands.
//
// W, A, S, D act as up, left, down and right (their places on a QWERTY
// keyboard) and Enter confirms. Each command is a one-clock pulse in the
// cycle ascii_ready is high. Follows the design description; combinational.
module key_decode (
  input  logic [7:0] ascii,
  input  logic       ascii_ready,
  output logic       up,
  output logic       left,
  output logic       down,
  output logic       right,
  output logic       enter
);
  assign up    = ascii_ready && (ascii == "W");
  assign left  = ascii_ready && (ascii == "A");
  assign down  = ascii_ready && (ascii == "S");
  assign right = ascii_ready && (ascii == "D");
  assign enter = ascii_ready && (ascii == 8'h0D);
endmodule
