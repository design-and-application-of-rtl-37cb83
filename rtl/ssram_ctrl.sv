// ssram_ctrl: AHB controller for the dual-port synchronous SRAM (SSRAM).
//
// The SSRAM is the shared audio buffer between the AHB side (8051 master)
// and the DSP side.  Port A is an AHB slave; port B is a plain synchronous
// port for the DSP (one access per clock, read data one cycle after the
// address).  The default size is 2048 x 32 bits = 65536 bits, the block RAM
// the platform uses.  Byte and halfword writes are honoured with byte lanes
// from HSIZE/HADDR[1:0].
//
// Port A is controlled by a four-state machine:
//   IDLE  -- no transfer in its data phase
//   WRITE -- data phase of a write: HWDATA is written, no wait state
//   RWAIT -- first data-phase cycle of a read: the RAM is read, HREADYOUT=0
//   RDATA -- second data-phase cycle of a read: HRDATA valid, HREADYOUT=1
// A read thus has one wait state because the RAM is synchronous.  A new
// address phase is accepted in IDLE, WRITE and RDATA.  When both ports write
// the same word in the same cycle, port A (AHB) wins.  The state names and
// the wait state are this design's choice; the document gives the function
// and the count of four states.
module ssram_ctrl
  import soc_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          hclk,
  input  logic          hresetn,
  // port A: AHB slave
  input  logic          hsel,
  input  ahb_m2s_t      m,
  input  logic          hready,
  output ahb_s2m_t      s,
  // port B: DSP side
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_RWAIT, S_RDATA} state_e;
  state_e state;

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] addr_q;
  logic [3:0]    lanes_q;
  logic [31:0]   rdata_q;
  logic          start;
  logic [3:0]    lanes;

  assign start = hsel && hready && (m.htrans == HTRANS_NONSEQ || m.htrans == HTRANS_SEQ);

  always_comb begin
    unique case (m.hsize)
      HSIZE_BYTE: lanes = 4'b0001 << m.haddr[1:0];
      HSIZE_HALF: lanes = m.haddr[1] ? 4'b1100 : 4'b0011;
      default:    lanes = 4'b1111;
    endcase
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      lanes_q <= '0;
    end else begin
      if (state == S_RWAIT) begin
        state <= S_RDATA;
      end else if (start) begin
        state   <= m.hwrite ? S_WRITE : S_RWAIT;
        addr_q  <= m.haddr[AW+1:2];
        lanes_q <= lanes;
      end else begin
        state <= S_IDLE;
      end
    end
  end

  // The memory array: port B first, then port A, so port A wins a clash.
  always_ff @(posedge hclk) begin
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (state == S_WRITE)
      for (int unsigned l = 0; l < 4; l++)
        if (lanes_q[l]) mem[addr_q][8*l +: 8] <= m.hwdata[8*l +: 8];
    if (state == S_RWAIT) rdata_q <= mem[addr_q];
    if (b_en && !b_we)   b_rdata <= mem[b_addr];
  end

  assign s.hready = (state != S_RWAIT);
  assign s.hresp  = HRESP_OKAY;
  assign s.hrdata = rdata_q;

endmodule
