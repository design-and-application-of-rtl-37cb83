// apb_bridge: AHB-to-APB bridge of the platform.
//
// It is an AHB slave that turns each AHB transfer into an APB transfer on
// the low-speed peripheral bus.  The APB window (32 KB) is cut into 4 KB
// slots, one per peripheral; PSEL is one-hot from HADDR[14:12], and the
// peripheral sees HADDR[11:0].  The bridge holds the master with
// HREADYOUT low while the APB SETUP and ACCESS cycles run:
//
//   IDLE -> SETUP (PSEL=1, PENABLE=0) -> ACCESS (PSEL=1, PENABLE=1) -> IDLE
//
// A write therefore takes the AHB data phase plus two wait states, a read
// the same; read data is registered at the end of ACCESS and returned in
// the cycle HREADYOUT rises.  The APB uses the AHB clock (the document
// runs the AMBA system from one 40 MHz clock).  Slots without a peripheral
// read as zero.  The bridge's structure is this design's own: the document
// gives only its function.
module apb_bridge
  import soc_pkg::*;
#(
  parameter int unsigned NSLV = APB_SLAVES
) (
  input  logic            hclk,
  input  logic            hresetn,
  input  logic            hsel,
  input  ahb_m2s_t        m,
  input  logic            hready,       // bus HREADY (end of previous transfer)
  output ahb_s2m_t        s,            // this slave's response
  output apb_req_t        apb  [NSLV],  // one request per peripheral
  input  logic [31:0]     prdata [NSLV]
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACCESS, S_DONE} state_e;
  state_e state;

  logic        wr_q;
  logic [14:0] addr_q;
  logic [31:0] rdata_q;
  logic [2:0]  slot;
  logic        start;

  assign start = hsel && hready && (m.htrans == HTRANS_NONSEQ || m.htrans == HTRANS_SEQ);
  assign slot  = addr_q[14:12];

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      state   <= S_IDLE;
      wr_q    <= 1'b0;
      addr_q  <= '0;
      rdata_q <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state  <= S_SETUP;
          wr_q   <= m.hwrite;
          addr_q <= m.haddr[14:0];
        end
        S_SETUP:  state <= S_ACCESS;
        S_ACCESS: begin
          state   <= S_DONE;
          rdata_q <= (32'(slot) < NSLV) ? prdata[slot] : 32'h0;
        end
        S_DONE: if (start) begin
          state  <= S_SETUP;
          wr_q   <= m.hwrite;
          addr_q <= m.haddr[14:0];
        end else begin
          state <= S_IDLE;
        end
      endcase
    end
  end

  // HWDATA is valid during the AHB data phase, which the bridge stretches
  // over SETUP and ACCESS, so it is passed straight through.
  always_comb begin
    for (int unsigned i = 0; i < NSLV; i++) begin
      apb[i].psel    = (state == S_SETUP || state == S_ACCESS) && (slot == 3'(i));
      apb[i].penable = (state == S_ACCESS);
      apb[i].pwrite  = wr_q;
      apb[i].paddr   = addr_q[11:0];
      apb[i].pwdata  = m.hwdata;
    end
  end

  assign s.hready = (state == S_IDLE) || (state == S_DONE);
  assign s.hresp  = HRESP_OKAY;
  assign s.hrdata = rdata_q;

endmodule
