// i2s_rx: I2S serial receiver, clocked by the serial clock SCK.
//
// Follows the receiver structure of the platform: WS goes through two
// flip-flops (WSD and its delayed copy); their XOR is the pulse WSP that
// marks a channel change.  I2S puts the MSB on SD one SCK period after WS
// changes, so the bit sampled on the rising SCK edge where WSP is high is
// the MSB of the new word.  A bit counter then lets the next W-1 bits into
// the W-bit shift register (bits after the LSB are ignored, so longer
// transmitter words are truncated, shorter ones are padded with whatever
// follows); when the counter reaches W the word is copied into the left
// (WS=0) or right (WS=1) data register.  Each completed right word toggles
// frame_tgl, which the bus side synchronises.
//
// Data are sampled on the rising (leading) SCK edge as the I2S rules
// require.  The document's receiver counts on the falling edge; here the
// counter shares the rising edge with the shift register, which gives the
// same bit positions.  rst_n is asynchronous.
module i2s_rx #(
  parameter int unsigned W = 16
) (
  input  logic         sck,
  input  logic         rst_n,
  input  logic         ws,
  input  logic         sd,
  output logic [W-1:0] left,
  output logic [W-1:0] right,
  output logic         frame_tgl
);

  logic         wsd, wsdd, wsp;
  logic [W-1:0] shreg;
  logic [$clog2(W+1)-1:0] cnt;
  logic         chan;

  assign wsp = wsd ^ wsdd;

  always_ff @(posedge sck or negedge rst_n) begin
    if (!rst_n) begin
      wsd       <= 1'b0;
      wsdd      <= 1'b0;
      shreg     <= '0;
      cnt       <= '0;
      chan      <= 1'b0;
      left      <= '0;
      right     <= '0;
      frame_tgl <= 1'b0;
    end else begin
      wsd  <= ws;
      wsdd <= wsd;
      if (wsp) begin
        shreg <= {{(W-1){1'b0}}, sd};
        cnt   <= 1;
        chan  <= wsd;
      end else if (cnt != 0 && 32'(cnt) < W) begin
        shreg <= {shreg[W-2:0], sd};
        cnt   <= cnt + 1'b1;
      end else if (32'(cnt) == W) begin
        cnt <= '0;
        if (chan) begin
          right     <= shreg;
          frame_tgl <= !frame_tgl;
        end else begin
          left <= shreg;
        end
      end
    end
  end

endmodule
