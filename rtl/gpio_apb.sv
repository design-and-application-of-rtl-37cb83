// gpio_apb: general-purpose I/O port on the APB.
//
// WIDTH pins (24 by default, the document's maximum; 4 is its minimum),
// each configured by software as input or output.  Every pin has an output
// latch, a direction bit and a synchronised input value.  An input that
// changes while its interrupt enable bit is set raises its flag; the
// interrupt output is the OR of the flags.  The GPIO is the highest-priority
// source at the interrupt controller.
//
// Registers are byte wide; byte k of a WIDTH-bit register sits at
// GROUP*0x20 + k*4:
//   group 0 OUT   output latches            (read/write)
//   group 1 DIR   1 = pin is an output      (read/write)
//   group 2 IN    synchronised pin values   (read only)
//   group 3 IE    change-interrupt enables  (read/write)
//   group 4 IFLG  change flags, write 1 to clear
// Pins reach IN three clocks after they change (a two-flop synchroniser and
// the register that the change detector compares against).  Output pins
// raise no flags.  The
// register layout and the change interrupt are this design's choice; the
// document gives the GPIO's function and its width range.
module gpio_apb
  import soc_pkg::*;
#(
  parameter int unsigned WIDTH = 24,
  localparam int unsigned NB   = (WIDTH + 7) / 8
) (
  input  logic             pclk,
  input  logic             presetn,
  input  apb_req_t         apb,
  output logic [31:0]      prdata,
  input  logic [WIDTH-1:0] pin_in,
  output logic [WIDTH-1:0] pin_out,
  output logic [WIDTH-1:0] pin_oe,
  output logic             irq
);

  logic [NB*8-1:0] out_q, dir_q, ie_q, flag_q, in_s1, in_s2, in_q;
  logic            apb_wr;
  logic [2:0]      grp;
  logic [2:0]      byte_i;

  assign apb_wr = apb.psel && apb.penable && apb.pwrite;
  assign grp    = apb.paddr[7:5];
  assign byte_i = apb.paddr[4:2];

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      out_q  <= '0;
      dir_q  <= '0;
      ie_q   <= '0;
      flag_q <= '0;
      in_s1  <= '0;
      in_s2  <= '0;
      in_q   <= '0;
    end else begin
      in_s1 <= (NB*8)'(pin_in);
      in_s2 <= in_s1;
      in_q  <= in_s2;
      flag_q <= flag_q | ((in_s2 ^ in_q) & ie_q & ~dir_q);
      if (apb_wr && 32'(byte_i) < NB) begin
        unique case (grp)
          3'd0: out_q[8*byte_i +: 8] <= apb.pwdata[7:0];
          3'd1: dir_q[8*byte_i +: 8] <= apb.pwdata[7:0];
          3'd3: ie_q [8*byte_i +: 8] <= apb.pwdata[7:0];
          3'd4: flag_q[8*byte_i +: 8] <= (flag_q[8*byte_i +: 8] | ((in_s2[8*byte_i +: 8] ^ in_q[8*byte_i +: 8]) & ie_q[8*byte_i +: 8] & ~dir_q[8*byte_i +: 8])) & ~apb.pwdata[7:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = 32'h0;
    if (32'(byte_i) < NB) begin
      unique case (grp)
        3'd0: prdata[7:0] = out_q [8*byte_i +: 8];
        3'd1: prdata[7:0] = dir_q [8*byte_i +: 8];
        3'd2: prdata[7:0] = in_q  [8*byte_i +: 8];
        3'd3: prdata[7:0] = ie_q  [8*byte_i +: 8];
        3'd4: prdata[7:0] = flag_q[8*byte_i +: 8];
        default: ;
      endcase
    end
  end

  assign pin_out = out_q[WIDTH-1:0];
  assign pin_oe  = dir_q[WIDTH-1:0];
  assign irq     = |flag_q;

endmodule
