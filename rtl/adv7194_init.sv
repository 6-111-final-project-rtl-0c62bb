// adv7194_init: resets the ADV7194 video encoder and sets its mode registers.
//
// After reset (stretched to RESET_HOLD clocks) the sequencer holds the
// encoder's reset_b low for two steps, releases it, then writes over I2C the
// device address 0x56, sub-address 0x00 and mode registers 0..7 in one
// auto-incrementing transfer. It then idles and watches `colorbars`: when it
// changes, register 4 is rewritten (address 0x56, sub-address 0x04, value)
// with the colour-bar bit (bit 6) set accordingly. The sequencer and the I2C
// transmitter step on a clock enable at CLK_DIV-clock intervals (1 MHz from
// 27 MHz, 250 kHz SCL).
//
// Register settings, as described for the design: NTSC, normal (not square)
// pixels, 720-pixel active line, interlaced, composite and S-video DACs on,
// pixel port enabled, RGB sync on, SMPTE luma levels:
//   R0 0x00  R1 0x47  R2 0x40  R3 0x00  R4 0x00 (| 0x40 colour bars)
//   R5 0x09  R6 0x01  R7 0x00
// The reset/address/register sequence and the register values follow the
// design description; the use of a clock enable rather than a divided clock
// is this implementation's choice.
module adv7194_init #(
  parameter int unsigned CLK_DIV    = 27,
  parameter int unsigned RESET_HOLD = 100
) (
  input  logic clk,
  input  logic rst,
  input  logic colorbars,
  output logic tv_reset_b,
  output logic i2c_scl,
  output logic i2c_sda,
  output logic configured    // initial register write finished
);
  localparam logic [7:0] DEV_ADDR = 8'h56;
  localparam logic [7:0] REGS [8] = '{8'h00, 8'h47, 8'h40, 8'h00, 8'h00, 8'h09, 8'h01, 8'h00};
  localparam int unsigned DW = $clog2(CLK_DIV);
  localparam int unsigned RW = $clog2(RESET_HOLD + 1);

  // step enable
  logic [DW-1:0] div;
  logic          en;
  always_ff @(posedge clk) begin
    if (rst || div == DW'(CLK_DIV - 1)) div <= '0;
    else                                div <= div + 1'b1;
  end
  assign en = (div == DW'(CLK_DIV - 1));

  // reset stretch
  logic [RW-1:0] hold;
  logic          srst;
  always_ff @(posedge clk) begin
    if (rst)            hold <= RW'(RESET_HOLD);
    else if (hold != 0) hold <= hold - 1'b1;
  end
  assign srst = (hold != 0);

  typedef enum logic [3:0] {
    S_RESET0, S_RESET1, S_RELEASE, S_ADDR, S_SUB, S_REGS, S_FINISH,
    S_WATCH, S_RADDR, S_RSUB, S_R4, S_RFINISH
  } state_t;

  state_t     state;
  logic [2:0] reg_n;
  logic [7:0] data;
  logic       load, ack, idle;
  logic       last_bars;
  logic [7:0] reg4;

  assign reg4 = REGS[4] | {1'b0, colorbars, 6'b0};

  always_ff @(posedge clk) begin
    if (srst) begin
      state      <= S_RESET0;
      reg_n      <= '0;
      data       <= '0;
      load       <= 1'b0;
      tv_reset_b <= 1'b0;
      configured <= 1'b0;
      last_bars  <= 1'b0;
    end else if (en) begin
      unique case (state)
        S_RESET0: begin
          load       <= 1'b0;
          tv_reset_b <= 1'b0;
          last_bars  <= colorbars;
          state      <= S_RESET1;
        end
        S_RESET1:  state <= S_RELEASE;
        S_RELEASE: begin
          tv_reset_b <= 1'b1;
          state      <= S_ADDR;
        end
        S_ADDR: begin
          data <= DEV_ADDR;
          load <= 1'b1;
          if (ack) state <= S_SUB;
        end
        S_SUB: begin
          data <= 8'h00;
          if (ack) begin
            reg_n <= '0;
            state <= S_REGS;
          end
        end
        S_REGS: begin
          data <= (reg_n == 3'd4) ? reg4 : REGS[reg_n];
          if (ack) begin
            if (reg_n == 3'd7) state <= S_FINISH;
            else               reg_n <= reg_n + 3'd1;
          end
        end
        S_FINISH: begin
          load <= 1'b0;
          if (idle) begin
            configured <= 1'b1;
            state      <= S_WATCH;
          end
        end
        S_WATCH: begin
          last_bars <= colorbars;
          if (colorbars != last_bars) state <= S_RADDR;
        end
        S_RADDR: begin
          data <= DEV_ADDR;
          load <= 1'b1;
          if (ack) state <= S_RSUB;
        end
        S_RSUB: begin
          data <= 8'h04;
          if (ack) state <= S_R4;
        end
        S_R4: begin
          data <= reg4;
          if (ack) state <= S_RFINISH;
        end
        S_RFINISH: begin
          load <= 1'b0;
          if (idle) state <= S_WATCH;
        end
        default: state <= S_RESET0;
      endcase
    end
  end

  // ack is a one-clock pulse; hold it until the next step so the sequencer,
  // which only looks on `en`, sees it.
  logic ack_raw, ack_seen;
  always_ff @(posedge clk) begin
    if (srst)         ack_seen <= 1'b0;
    else if (ack_raw) ack_seen <= 1'b1;
    else if (en)      ack_seen <= 1'b0;
  end
  assign ack = ack_seen;

  i2c_tx u_i2c (
    .clk, .rst(srst), .en, .data, .load, .ack(ack_raw), .idle,
    .scl(i2c_scl), .sda(i2c_sda)
  );
endmodule
