// i2s_apb: one I2S group (transmitter + receiver) on the APB.
//
// The serial side runs on the I2S bit clock SCK with word select WS, both
// supplied by the platform's I2S clock generator (SCK = 64 x fs, so each
// channel slot is 32 bits, of which the first W = 16 carry the sample, MSB
// first, two's complement).  The bus side holds the left and right words to
// send and the last pair received.
//
// Crossing between the two clocks: the receiver toggles frame_tgl after
// each right-channel word; the bus side passes that toggle through two
// flip-flops, and on its change copies both received words (stable for the
// next 16 SCK periods) into bus registers, pulses rx_valid for one clock
// and sets the READY flag.  The transmit words are bus registers that the
// SCK side samples at the WS change.
//
// Registers (one byte each, byte offset):
//   0x00 TXL low   0x04 TXL high   0x08 TXR low   0x0C TXR high  (read/write)
//   0x10 RXL low   0x14 RXL high   0x18 RXR low   0x1C RXR high  (read only)
//   0x20 STAT  bit0 READY (write 1 to clear), bit1 interrupt enable
// irq = READY and interrupt enable.  rx_valid/rx_left/rx_right also give
// the received pairs as a stream (used to feed the reverberator).  Register
// layout and the synchroniser are this design's choice.
module i2s_apb
  import soc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         pclk,
  input  logic         presetn,
  input  apb_req_t     apb,
  output logic [31:0]  prdata,
  output logic         irq,
  // serial side
  input  logic         sck,
  input  logic         ws,
  input  logic         sd_in,
  output logic         sd_out,
  // received stream, bus clock domain
  output logic         rx_valid,
  output logic [W-1:0] rx_left,
  output logic [W-1:0] rx_right
);

  logic [15:0]  txl_q, txr_q;
  logic [W-1:0] rxl_s, rxr_s;
  logic         tgl_s;
  logic [2:0]   tgl_sync;
  logic         ready_q, ie_q;
  logic         apb_wr;

  assign apb_wr = apb.psel && apb.penable && apb.pwrite;

  i2s_tx #(.W(W)) u_tx (
    .sck(sck), .rst_n(presetn), .ws(ws),
    .left(txl_q[W-1:0]), .right(txr_q[W-1:0]), .sd(sd_out)
  );

  i2s_rx #(.W(W)) u_rx (
    .sck(sck), .rst_n(presetn), .ws(ws), .sd(sd_in),
    .left(rxl_s), .right(rxr_s), .frame_tgl(tgl_s)
  );

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      tgl_sync <= '0;
      rx_left  <= '0;
      rx_right <= '0;
      rx_valid <= 1'b0;
      ready_q  <= 1'b0;
      ie_q     <= 1'b0;
      txl_q    <= '0;
      txr_q    <= '0;
    end else begin
      tgl_sync <= {tgl_sync[1:0], tgl_s};
      rx_valid <= 1'b0;
      if (tgl_sync[2] != tgl_sync[1]) begin
        rx_left  <= rxl_s;
        rx_right <= rxr_s;
        rx_valid <= 1'b1;
        ready_q  <= 1'b1;
      end else if (apb_wr && apb.paddr[7:2] == 6'd8 && apb.pwdata[0]) begin
        ready_q <= 1'b0;
      end
      if (apb_wr) begin
        unique case (apb.paddr[7:2])
          6'd0: txl_q[7:0]  <= apb.pwdata[7:0];
          6'd1: txl_q[15:8] <= apb.pwdata[7:0];
          6'd2: txr_q[7:0]  <= apb.pwdata[7:0];
          6'd3: txr_q[15:8] <= apb.pwdata[7:0];
          6'd8: ie_q        <= apb.pwdata[1];
          default: ;
        endcase
      end
    end
  end

  logic [15:0] rxl16, rxr16;
  assign rxl16 = 16'(rx_left);
  assign rxr16 = 16'(rx_right);

  always_comb begin
    unique case (apb.paddr[7:2])
      6'd0:    prdata = {24'h0, txl_q[7:0]};
      6'd1:    prdata = {24'h0, txl_q[15:8]};
      6'd2:    prdata = {24'h0, txr_q[7:0]};
      6'd3:    prdata = {24'h0, txr_q[15:8]};
      6'd4:    prdata = {24'h0, rxl16[7:0]};
      6'd5:    prdata = {24'h0, rxl16[15:8]};
      6'd6:    prdata = {24'h0, rxr16[7:0]};
      6'd7:    prdata = {24'h0, rxr16[15:8]};
      6'd8:    prdata = {30'h0, ie_q, ready_q};
      default: prdata = 32'h0;
    endcase
  end

  assign irq = ready_q && ie_q;

endmodule
