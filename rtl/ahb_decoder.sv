// ahb_decoder: AHB address decoder and slave-to-master multiplexer.
//
// The platform has a single AHB master, the 8051 wrapper, so the
// "decoder / arbiter" of the platform reduces to the decoder: it turns the
// address-phase HADDR into one HSEL line per slave and, one transfer later,
// steers the selected slave's HRDATA/HREADY/HRESP back to the master.  The
// data-phase select is registered whenever HREADY is high, as AMBA 2
// requires.  Addresses outside the map (HADDR[31:16] non-zero) go to a
// built-in default slave that answers OKAY with zero data and no wait.
//
// Map (this design's choice; the document gives no addresses):
//   0x0000_0000 - 0x0000_7FFF  SSRAM controller   (slave 0)
//   0x0000_8000 - 0x0000_FFFF  AHB-to-APB bridge  (slave 1)
//
// Timing: HSEL is combinational from HADDR; the response mux is selected by
// a register loaded at the end of every address phase.
module ahb_decoder
  import soc_pkg::*;
(
  input  logic                  hclk,
  input  logic                  hresetn,
  input  ahb_m2s_t              m,                    // from the master
  output logic [AHB_SLAVES-1:0] hsel,                 // to the slaves
  input  ahb_s2m_t              s [AHB_SLAVES],       // from the slaves
  output ahb_s2m_t              r                     // to the master and slaves (HREADY)
);

  localparam int unsigned SEL_W = $clog2(AHB_SLAVES + 1);
  localparam logic [SEL_W-1:0] SEL_DEFAULT = SEL_W'(AHB_SLAVES);

  logic [SEL_W-1:0] aphase_sel, dphase_sel;

  always_comb begin
    hsel = '0;
    if (m.haddr[31:16] != 16'h0) begin
      aphase_sel = SEL_DEFAULT;
    end else if (m.haddr[15]) begin
      aphase_sel = SEL_W'(AHB_APB);
      hsel[AHB_APB] = 1'b1;
    end else begin
      aphase_sel = SEL_W'(AHB_SSRAM);
      hsel[AHB_SSRAM] = 1'b1;
    end
  end

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)     dphase_sel <= SEL_DEFAULT;
    else if (r.hready) dphase_sel <= aphase_sel;
  end

  always_comb begin
    r = '{hrdata: 32'h0, hready: 1'b1, hresp: HRESP_OKAY};
    for (int unsigned i = 0; i < AHB_SLAVES; i++)
      if (dphase_sel == SEL_W'(i)) r = s[i];
  end

endmodule
