// i2c_monitor: passive I2C bus watcher used by the testbenches.
//
// It decodes the two wires independently of any transmitter: a falling SDA
// while SCL is high is a START, a rising SDA while SCL is high is a STOP, and
// SDA is sampled on every rising SCL edge, nine samples making one byte plus
// its acknowledge slot. Events are appended to the queue `items`: -1 for a
// START, -2 for a STOP and 0..255 for each byte. `ack_released` stays 1 as
// long as the master left SDA high in every acknowledge slot (no slave is
// modelled, so nothing pulls the line low). `bad_bits` counts SDA changes
// while SCL is high that were neither START nor STOP edges, which cannot be
// told apart from them, so any such edge also shows up as a START or STOP.
//
// Interface: inputs scl, sda. Purely a testbench model, not synthesisable.
module i2c_monitor (
  input logic scl,
  input logic sda
);
  int         items [$];
  bit         ack_released = 1'b1;
  int         nbits = 0;
  logic [8:0] sh = '0;

  always @(negedge sda) if (scl) begin
    items.push_back(-1);
    nbits = 0;
  end

  always @(posedge sda) if (scl) begin
    items.push_back(-2);
    nbits = 0;
  end

  always @(posedge scl) begin
    sh = {sh[7:0], sda};
    nbits++;
    if (nbits == 9) begin
      items.push_back(int'(sh[8:1]));
      if (!sh[0]) ack_released = 1'b0;
      nbits = 0;
    end
  end
endmodule
