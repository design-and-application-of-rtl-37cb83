// i2s_clkgen: I2S master clock generator, a stand-alone module of the
// platform.
//
// From an 18.432 MHz master clock it makes the bit clock SCK = 3.072 MHz
// (divide by MCLK_DIV = 6) and the word select WS = fs = 48 kHz
// (SLOT_BITS = 32 SCK periods per channel, 64 per frame), the figures the
// document gives.  Both outputs come straight from flip-flops.  SCK is high
// for the first half of each MCLK_DIV-cycle period; WS changes together
// with the falling SCK edge, so a transmitter sees it one rising edge before
// the MSB, as I2S requires.  WS = 0 is the left channel.
module i2s_clkgen #(
  parameter int unsigned MCLK_DIV  = 6,
  parameter int unsigned SLOT_BITS = 32
) (
  input  logic mclk,
  input  logic rst_n,
  output logic sck,
  output logic ws
);

  localparam int unsigned DW = $clog2(MCLK_DIV);
  localparam int unsigned BW = $clog2(2 * SLOT_BITS);

  logic [DW-1:0] div;
  logic [BW-1:0] bitc;   // bit position in the 64-bit frame

  always_ff @(posedge mclk or negedge rst_n) begin
    if (!rst_n) begin
      div  <= '0;
      bitc <= '0;
      sck  <= 1'b0;
      ws   <= 1'b0;
    end else begin
      div <= (div == DW'(MCLK_DIV - 1)) ? '0 : div + 1'b1;
      if (div == DW'(MCLK_DIV - 1)) begin
        sck <= 1'b1;
      end else if (div == DW'(MCLK_DIV / 2 - 1)) begin
        sck  <= 1'b0;
        bitc <= bitc + 1'b1;
        ws   <= ((bitc + 1'b1) >= BW'(SLOT_BITS));
      end
    end
  end

endmodule
