// ps2_rx: PS/2 keyboard receiver with an 8-byte FIFO.
//
// The keyboard's clock is synchronised to the system clock and each falling
// edge samples the data line. A frame is 11 bits: start (0), 8 data bits LSB
// first, odd parity, stop (1). A frame with a valid start bit, stop bit and
// parity puts its byte into an 8-entry FIFO; a bad frame is dropped. The FIFO
// is read with `rd` (first word fall-through: `data` always shows the oldest
// byte while `empty` is low). `overflow` is set when a byte arrives with the
// FIFO full (the byte is dropped) and cleared by the next read. The
// description only says that the keyboard module pulls key data from a FIFO;
// the frame checks and FIFO behaviour are this implementation's.
module ps2_rx #(
  parameter int unsigned DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ps2_clk,
  input  logic       ps2_data,
  input  logic       rd,
  output logic [7:0] data,
  output logic       empty,
  output logic       overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [2:0] clk_sync;
  logic [1:0] dat_sync;
  logic       fall;

  always_ff @(posedge clk) begin
    clk_sync <= {clk_sync[1:0], ps2_clk};
    dat_sync <= {dat_sync[0], ps2_data};
  end
  assign fall = clk_sync[2] && !clk_sync[1];

  logic [3:0]  nbits;
  logic [9:0]  shreg;        // start, d0..d7, parity as they arrive
  logic [7:0]  fifo [DEPTH];
  logic [AW:0] wptr, rptr;
  logic        full, frame_ok;

  assign empty    = (wptr == rptr);
  assign full     = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign data     = fifo[rptr[AW-1:0]];
  // shreg[0] = start bit, shreg[8:1] = data, shreg[9] = parity; dat_sync[1] = stop
  assign frame_ok = !shreg[0] && dat_sync[1] && (^shreg[9:1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      nbits    <= '0;
      shreg    <= '0;
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      if (fall) begin
        if (nbits == 4'd10) begin
          nbits <= '0;
          if (frame_ok) begin
            if (!full) begin
              fifo[wptr[AW-1:0]] <= shreg[8:1];
              wptr <= wptr + 1'b1;
            end else begin
              overflow <= 1'b1;
            end
          end
        end else begin
          shreg <= {dat_sync[1], shreg[9:1]};
          nbits <= nbits + 4'd1;
        end
      end
      if (rd && !empty) begin
        rptr     <= rptr + 1'b1;
        overflow <= 1'b0;
      end
    end
  end
endmodule
