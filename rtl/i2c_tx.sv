// i2c_tx: write-only I2C master that sends a stream of bytes.
//
// Runs on the system clock; `en` pulses at four times the wanted SCL rate and
// every bus action takes one such quarter-bit step. The user raises `load`
// with the first byte on `data`; the transmitter makes a START condition and
// shifts the byte out MSB first, then leaves one clock for the slave's
// acknowledge (SDA released, not checked). Each time it takes a byte from
// `data` it pulses `ack` for one system clock, which tells the user to put
// the next byte on `data`. After a byte, if `load` is still high the next
// byte follows in the same transfer; otherwise it makes a STOP condition and
// returns to idle (`idle` = 1). The load/ack/idle handshake follows the
// design description's use of the interface module; the bus sequencing is
// this implementation's own. SDA is an open-drain line on the board: here
// sda = 1 means released.
//
// Bit timing (quarters): SCL low while SDA changes, high for two quarters
// while SDA is stable. START: SDA falls while SCL is high; STOP: SDA rises
// while SCL is high.
module i2c_tx (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,      // quarter-bit enable
  input  logic [7:0] data,
  input  logic       load,
  output logic       ack,     // one clock: byte taken, present the next
  output logic       idle,
  output logic       scl,
  output logic       sda
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_BIT, S_ACK, S_STOP} state_t;

  state_t     state;
  logic [1:0] quarter;
  logic [2:0] bit_n;
  logic [7:0] shreg;

  assign idle = (state == S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      quarter <= '0;
      bit_n   <= '0;
      shreg   <= '0;
      ack     <= 1'b0;
      scl     <= 1'b1;
      sda     <= 1'b1;
    end else begin
      ack <= 1'b0;
      if (en) begin
        quarter <= quarter + 2'd1;
        unique case (state)
          S_IDLE: begin
            quarter <= '0;
            scl     <= 1'b1;
            sda     <= 1'b1;
            if (load) begin
              shreg <= data;
              ack   <= 1'b1;
              state <= S_START;
            end
          end
          S_START: begin
            // q0: SDA falls (SCL high), q1..q2: hold, q3: SCL low
            if (quarter == 2'd0) sda <= 1'b0;
            if (quarter == 2'd3) begin
              scl   <= 1'b0;
              bit_n <= 3'd7;
              state <= S_BIT;
            end
          end
          S_BIT: begin
            unique case (quarter)
              2'd0: sda <= shreg[bit_n];
              2'd1: scl <= 1'b1;
              2'd2: scl <= 1'b1;
              2'd3: begin
                scl <= 1'b0;
                if (bit_n == 3'd0) state <= S_ACK;
                else               bit_n <= bit_n - 3'd1;
              end
            endcase
          end
          S_ACK: begin
            unique case (quarter)
              2'd0: sda <= 1'b1;          // release for the slave
              2'd1: scl <= 1'b1;
              2'd2: scl <= 1'b1;
              2'd3: begin
                scl <= 1'b0;
                if (load) begin
                  shreg <= data;
                  ack   <= 1'b1;
                  bit_n <= 3'd7;
                  state <= S_BIT;
                end else begin
                  state <= S_STOP;
                end
              end
            endcase
          end
          S_STOP: begin
            unique case (quarter)
              2'd0: sda <= 1'b0;
              2'd1: scl <= 1'b1;
              2'd2: sda <= 1'b1;
              2'd3: state <= S_IDLE;
            endcase
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
