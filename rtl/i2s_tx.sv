// i2s_tx: I2S serial transmitter, clocked by the serial clock SCK.
//
// Follows the transmitter structure of the platform: WS is registered on
// the rising SCK edge (WSD) and again (delayed copy); their XOR is the
// pulse WSP.  On the falling SCK edge where WSP is high, the W-bit shift
// register is parallel-loaded with the left word (new WS = 0) or the right
// word (new WS = 1); on every other falling edge it shifts towards the MSB
// with 0 entering at the LSB, so SD carries the word MSB first, starting one
// SCK period after the WS change, followed by zeros.
//
// left/right come from the bus clock domain; they must be stable around the
// WS change, which the bus side guarantees by writing them well inside a
// frame.  rst_n is asynchronous.
module i2s_tx #(
  parameter int unsigned W = 16
) (
  input  logic         sck,
  input  logic         rst_n,
  input  logic         ws,
  input  logic [W-1:0] left,
  input  logic [W-1:0] right,
  output logic         sd
);

  logic         wsd, wsdd, wsp;
  logic [W-1:0] shreg;

  assign wsp = wsd ^ wsdd;
  assign sd  = shreg[W-1];

  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      wsd  <= 1'b0;
      wsdd <= 1'b0;
    end else begin
      wsd  <= ws;
      wsdd <= wsd;
    end
  end

  always_ff @(negedge sck or negedge rst_n) begin
    if (!rst_n)   shreg <= '0;
    else if (wsp) shreg <= wsd ? right : left;
    else          shreg <= {shreg[W-2:0], 1'b0};
  end

endmodule
