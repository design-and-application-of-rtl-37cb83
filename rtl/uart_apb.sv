// uart_apb: UART peripheral on the APB.
//
// Frame format, as the document fixes it: one start bit (0), 8 data bits
// LSB first, an even parity bit and one stop bit (1); 9600 baud by default.
// There is no modem handshake (no CTS/RTS).  A 16-bit divisor register sets
// a tick at 16 x the baud rate from the bus clock; its reset value is
// round(CLK_HZ / (16 * BAUD)).  The transmitter sends one bit every 16
// ticks; the receiver finds the start edge, checks the start bit half a bit
// later and then samples every bit in its middle.
//
// Registers (one byte each, byte offset):
//   0x00 DATA  write: byte to send (ignored while the transmitter is busy)
//              read : last byte received; reading clears RX_READY
//   0x04 LCR   line control: bit0 receiver enable, bit1 transmitter enable
//   0x08 LSR   line status : bit0 RX_READY, bit1 TX_BUSY,
//                            bit2 parity error, bit3 framing error
//   0x0C DIVL  divisor, low byte
//   0x10 DIVH  divisor, high byte
// int_n (active low) is asserted while a received byte waits, and is held
// high while the UART itself is selected on the APB, as the document asks.
// The bus and the bit stream share one clock here, with the divisor in
// place of the document's separate baud clock.  Register layout and
// oversampling are this design's choice.
module uart_apb
  import soc_pkg::*;
#(
  parameter int unsigned CLK_HZ = 40_000_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic        pclk,
  input  logic        presetn,
  input  apb_req_t    apb,
  output logic [31:0] prdata,
  input  logic        rx,
  output logic        tx,
  output logic        int_n
);

  localparam logic [15:0] DIV_RESET = 16'((CLK_HZ + 8 * BAUD) / (16 * BAUD));

  logic [15:0] div_q, tick_cnt;
  logic        tick;
  logic [1:0]  lcr_q;
  logic        apb_wr, apb_rd;

  assign apb_wr = apb.psel && apb.penable &&  apb.pwrite;
  assign apb_rd = apb.psel && apb.penable && !apb.pwrite;

  // ---------------- baud tick (16 x baud) ----------------
  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      tick_cnt <= '0;
      tick     <= 1'b0;
    end else if (tick_cnt + 16'd1 >= div_q) begin
      tick_cnt <= '0;
      tick     <= 1'b1;
    end else begin
      tick_cnt <= tick_cnt + 16'd1;
      tick     <= 1'b0;
    end
  end

  // ---------------- transmitter ----------------
  logic [10:0] tx_shift;   // start, 8 data, parity, stop (LSB sent first)
  logic [3:0]  tx_bits;    // bits left to send
  logic [3:0]  tx_ticks;
  logic        tx_busy;

  assign tx_busy = (tx_bits != 0);

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_ticks <= '0;
      tx       <= 1'b1;
    end else if (!tx_busy) begin
      tx <= 1'b1;
      if (apb_wr && apb.paddr[7:2] == 6'd0 && lcr_q[1]) begin
        tx_shift <= {1'b1, ^apb.pwdata[7:0], apb.pwdata[7:0], 1'b0};
        tx_bits  <= 4'd11;
        tx_ticks <= '0;
      end
    end else if (tick) begin
      tx <= tx_shift[0];
      if (tx_ticks == 4'd15) begin
        tx_ticks <= '0;
        tx_shift <= {1'b1, tx_shift[10:1]};
        tx_bits  <= tx_bits - 4'd1;
      end else begin
        tx_ticks <= tx_ticks + 4'd1;
      end
    end
  end

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {R_IDLE, R_START, R_BITS} rstate_e;
  rstate_e     rstate;
  logic [1:0]  rx_sync;
  logic [3:0]  rx_ticks;
  logic [3:0]  rx_n;        // bits received so far in R_BITS (data, parity, stop)
  logic [9:0]  rx_shift;
  logic [7:0]  rx_data;
  logic        rx_ready, perr, ferr;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) rx_sync <= 2'b11;
    else          rx_sync <= {rx_sync[0], rx};
  end

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      rstate   <= R_IDLE;
      rx_ticks <= '0;
      rx_n     <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
      rx_ready <= 1'b0;
      perr     <= 1'b0;
      ferr     <= 1'b0;
    end else begin
      if (apb_rd && apb.paddr[7:2] == 6'd0) rx_ready <= 1'b0;
      if (tick) begin
        unique case (rstate)
          R_IDLE: if (lcr_q[0] && !rx_sync[1]) begin
            rstate   <= R_START;
            rx_ticks <= '0;
          end
          R_START: begin
            if (rx_ticks == 4'd7) begin
              rx_ticks <= '0;
              rx_n     <= '0;
              rstate   <= rx_sync[1] ? R_IDLE : R_BITS;   // false start
            end else begin
              rx_ticks <= rx_ticks + 4'd1;
            end
          end
          R_BITS: begin
            if (rx_ticks == 4'd15) begin
              rx_ticks <= '0;
              rx_shift <= {rx_sync[1], rx_shift[9:1]};
              if (rx_n == 4'd9) begin
                rstate   <= R_IDLE;
                rx_data  <= rx_shift[8:1];
                perr     <= ^rx_shift[9:1];             // data ^ parity must be 0
                ferr     <= !rx_sync[1];
                rx_ready <= 1'b1;
              end
              rx_n <= rx_n + 4'd1;
            end else begin
              rx_ticks <= rx_ticks + 4'd1;
            end
          end
          default: rstate <= R_IDLE;
        endcase
      end
    end
  end

  // ---------------- registers ----------------
  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      lcr_q <= 2'b11;
      div_q <= DIV_RESET;
    end else if (apb_wr) begin
      unique case (apb.paddr[7:2])
        6'd1: lcr_q        <= apb.pwdata[1:0];
        6'd3: div_q[7:0]   <= apb.pwdata[7:0];
        6'd4: div_q[15:8]  <= apb.pwdata[7:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (apb.paddr[7:2])
      6'd0:    prdata = {24'h0, rx_data};
      6'd1:    prdata = {30'h0, lcr_q};
      6'd2:    prdata = {28'h0, ferr, perr, tx_busy, rx_ready};
      6'd3:    prdata = {24'h0, div_q[7:0]};
      6'd4:    prdata = {24'h0, div_q[15:8]};
      default: prdata = 32'h0;
    endcase
  end

  assign int_n = !(rx_ready && !apb.psel);

endmodule
