// wrap8051: wrapper that turns the 8051's external data-memory bus into
// AHB master transfers.
//
// The 8051 (12 MHz) cannot meet AHB timing (40 MHz) directly, so its MOVX
// cycles are re-timed here.  The 8051 side is the classic multiplexed bus:
// ALE, P0 (low address, then data), P2 (high address), RD# and WR#.  P0 is
// split into p0_in / p0_out / p0_oe so that the pad can be built outside.
//
// How it works:
//  * While ALE is high, P0 is sampled every AHB clock; the last sample
//    before ALE falls is the low address byte (this replaces the external
//    address latch of a classic 8051 system).
//  * RD# and WR# are brought into the AHB clock domain with two flip-flops.
//    A falling WR# starts one AHB NONSEQ byte write of the P0 data to
//    {P2, low address}; a falling RD# starts one AHB byte read.
//  * Read data is driven on P0 from the end of the AHB transfer until RD#
//    rises again.  The 8051 RD# pulse (about 400 ns at 12 MHz) is far longer
//    than a transfer through the APB bridge (about 10 AHB cycles including
//    synchronisation).
//  * Write data is replicated on all four HWDATA byte lanes; read data is
//    taken from lane HADDR[1:0].
// Only 8-bit accesses are made, as the document states.  The state machine
// is this design's own; the document gives only the wrapper's function.
module wrap8051
  import soc_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  // 8051 external bus
  input  logic        ale,
  input  logic [7:0]  p0_in,
  output logic [7:0]  p0_out,
  output logic        p0_oe,
  input  logic [7:0]  p2,
  input  logic        rd_n,
  input  logic        wr_n,
  // AHB master
  output ahb_m2s_t    m,
  input  ahb_s2m_t    r
);

  typedef enum logic [2:0] {S_IDLE, S_WADDR, S_WDATA, S_RADDR, S_RDATA, S_HOLD} state_e;
  state_e state;

  logic [7:0]  addr_lo;
  logic [15:0] addr_q;
  logic [7:0]  wdata_q;
  logic [7:0]  rdata_q;
  logic [1:0]  rd_sync, wr_sync;
  logic        rd_n_q, wr_n_q;

  // low address capture while ALE is high
  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)  addr_lo <= '0;
    else if (ale)  addr_lo <= p0_in;
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      rd_sync <= 2'b11;
      wr_sync <= 2'b11;
      rd_n_q  <= 1'b1;
      wr_n_q  <= 1'b1;
    end else begin
      rd_sync <= {rd_sync[0], rd_n};
      wr_sync <= {wr_sync[0], wr_n};
      rd_n_q  <= rd_sync[1];
      wr_n_q  <= wr_sync[1];
    end
  end

  logic rd_fall, wr_fall, strobes_high;
  assign rd_fall      = rd_n_q && !rd_sync[1];
  assign wr_fall      = wr_n_q && !wr_sync[1];
  assign strobes_high = rd_sync[1] && wr_sync[1];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= S_IDLE;
      addr_q  <= '0;
      wdata_q <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (wr_fall) begin
            state   <= S_WADDR;
            addr_q  <= {p2, addr_lo};
            wdata_q <= p0_in;
          end else if (rd_fall) begin
            state  <= S_RADDR;
            addr_q <= {p2, addr_lo};
          end
        end
        S_WADDR: if (r.hready) state <= S_WDATA;
        S_WDATA: if (r.hready) state <= S_HOLD;
        S_RADDR: if (r.hready) state <= S_RDATA;
        S_RDATA: if (r.hready) begin
          state   <= S_HOLD;
          rdata_q <= r.hrdata[8*addr_q[1:0] +: 8];
        end
        S_HOLD: if (strobes_high) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    m.htrans = (state == S_WADDR || state == S_RADDR) ? HTRANS_NONSEQ : HTRANS_IDLE;
    m.hwrite = (state == S_WADDR);
    m.hsize  = HSIZE_BYTE;
    m.haddr  = {16'h0, addr_q};
    m.hwdata = {4{wdata_q}};
  end

  assign p0_out = rdata_q;
  assign p0_oe  = (state == S_HOLD) && !rd_n;

endmodule
