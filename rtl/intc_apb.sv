// intc_apb: interrupt controller on the APB.
//
// The 8051 has only two external interrupt pins, so this block gathers up to
// NIRQ = 16 requests (GPIO, UART and I2S on inputs 0, 1 and 2, the rest
// reserved for later devices), prioritises them and drives the 8051's
// INT0# and INT1#.  Each input is programmed for level or rising-edge
// triggering.  Priority is fixed: the lower the input number, the higher
// the priority, which makes GPIO the highest, then UART, then I2S, as the
// document orders them.
//
//   pending[i] = level mode: the input itself
//                edge mode : set by a rising edge, cleared by writing 1
//   active[i]  = pending[i] & enable[i]
//   INT0# low while an active input is routed to INT0 (route bit 0),
//   INT1# low while an active input is routed to INT1 (route bit 1).
//
// Registers (one byte each; "lo" holds inputs 7..0, "hi" 15..8):
//   0x00/0x04 MODE  lo/hi   1 = edge, 0 = level
//   0x08/0x0C EN    lo/hi   interrupt enable
//   0x10/0x14 PEND  lo/hi   pending (read); write 1 clears an edge latch
//   0x18/0x1C ROUTE lo/hi   0 = INT0#, 1 = INT1#
//   0x20      VEC   bit7 = some input active, bits 3..0 = the highest-
//                   priority active input (read only)
// Inputs are synchronous to the bus clock.  Register layout and routing are
// this design's choice; the document gives the function.
module intc_apb
  import soc_pkg::*;
#(
  parameter int unsigned NIRQ = 16
) (
  input  logic            pclk,
  input  logic            presetn,
  input  apb_req_t        apb,
  output logic [31:0]     prdata,
  input  logic [NIRQ-1:0] irq_in,
  output logic            int0_n,
  output logic            int1_n
);

  logic [15:0] mode_q, en_q, route_q, edge_q, irq_q, pend, active;
  logic [15:0] irq16;
  logic        apb_wr;
  logic [3:0]  vec;
  logic        any;

  assign apb_wr = apb.psel && apb.penable && apb.pwrite;
  assign irq16  = 16'(irq_in);

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      mode_q  <= '0;
      en_q    <= '0;
      route_q <= '0;
      edge_q  <= '0;
      irq_q   <= '0;
    end else begin
      irq_q  <= irq16;
      edge_q <= edge_q | (irq16 & ~irq_q & mode_q);
      if (apb_wr) begin
        unique case (apb.paddr[7:2])
          6'd0: mode_q[7:0]   <= apb.pwdata[7:0];
          6'd1: mode_q[15:8]  <= apb.pwdata[7:0];
          6'd2: en_q[7:0]     <= apb.pwdata[7:0];
          6'd3: en_q[15:8]    <= apb.pwdata[7:0];
          6'd4: edge_q[7:0]   <= (edge_q[7:0]  | (irq16[7:0]  & ~irq_q[7:0]  & mode_q[7:0]))  & ~apb.pwdata[7:0];
          6'd5: edge_q[15:8]  <= (edge_q[15:8] | (irq16[15:8] & ~irq_q[15:8] & mode_q[15:8])) & ~apb.pwdata[7:0];
          6'd6: route_q[7:0]  <= apb.pwdata[7:0];
          6'd7: route_q[15:8] <= apb.pwdata[7:0];
          default: ;
        endcase
      end
    end
  end

  assign pend   = (mode_q & edge_q) | (~mode_q & irq16);
  assign active = pend & en_q;

  always_comb begin
    vec = '0;
    any = 1'b0;
    for (int i = 15; i >= 0; i--)
      if (active[i]) begin
        vec = 4'(i);
        any = 1'b1;
      end
  end

  always_comb begin
    unique case (apb.paddr[7:2])
      6'd0:    prdata = {24'h0, mode_q[7:0]};
      6'd1:    prdata = {24'h0, mode_q[15:8]};
      6'd2:    prdata = {24'h0, en_q[7:0]};
      6'd3:    prdata = {24'h0, en_q[15:8]};
      6'd4:    prdata = {24'h0, pend[7:0]};
      6'd5:    prdata = {24'h0, pend[15:8]};
      6'd6:    prdata = {24'h0, route_q[7:0]};
      6'd7:    prdata = {24'h0, route_q[15:8]};
      6'd8:    prdata = {24'h0, any, 3'b000, vec};
      default: prdata = 32'h0;
    endcase
  end

  assign int0_n = !(|(active & ~route_q));
  assign int1_n = !(|(active &  route_q));

endmodule
