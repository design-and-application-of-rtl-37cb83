// soc_top: the multimedia SoC platform for audio processing, with the
// LASP24 DSP address-generation and interrupt blocks beside it.
//
// Platform (AMBA 2, one 40 MHz bus clock hclk for AHB and APB):
//
//   8051 bus --> wrap8051 (AHB master) --> ahb_decoder
//                                            |-- ssram_ctrl (dual-port SSRAM,
//                                            |     port B to the DSP side)
//                                            '-- apb_bridge
//                                                  |-- uart_apb    0x8000
//                                                  |-- gpio_apb    0x9000
//                                                  |-- i2s_apb     0xA000 (group 0)
//                                                  |-- intc_apb    0xB000
//                                                  |-- reverb_fir  0xC000
//                                                  |-- i2s_apb     0xD000 (group 1)
//                                                  '-- i2s_apb     0xE000 (group 2)
//
// The 8051 itself and the DSP evaluation system are outside this RTL: the
// 8051 external bus, its two interrupt pins and the SSRAM's DSP port are
// top-level ports.  The I2S bit clock and word select come from i2s_clkgen,
// run from its own 18.432 MHz master clock mclk; SCK and WS are also driven
// out so that external codecs share them.  There are N_I2S = 3 I2S groups,
// as in the document's platform; all share SCK and WS and each has its own
// data pins.  Sample pairs received by group 0 stream straight into the
// reverberator (when its RUN bit is set); its early-reflection output
// leaves as a stream and through its registers.
// Interrupts: GPIO -> input 0, UART -> 1, I2S groups 0..2 -> 2..4,
// irq_ext -> 5..15.
//
// The LASP24 blocks (matrix and vector address generators, interrupt/DMA
// controller) belong to the DSP core, which is not part of this RTL; they
// stand beside the platform with their own ports.
//
// Resets: hresetn is asynchronous, active low, and also resets the I2S
// serial logic and the clock generator.
module soc_top
  import soc_pkg::*;
  import lasp_pkg::*;
(
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        mclk,
  // 8051 external bus and interrupt pins
  input  logic        ale,
  input  logic [7:0]  p0_in,
  output logic [7:0]  p0_out,
  output logic        p0_oe,
  input  logic [7:0]  p2,
  input  logic        rd_n,
  input  logic        wr_n,
  output logic        int0_n,
  output logic        int1_n,
  input  logic [15:5] irq_ext,
  // UART
  input  logic        uart_rx,
  output logic        uart_tx,
  // GPIO
  input  logic [23:0] gpio_in,
  output logic [23:0] gpio_out,
  output logic [23:0] gpio_oe,
  // I2S
  output logic        i2s_sck,
  output logic        i2s_ws,
  input  logic [N_I2S-1:0] i2s_sd_in,
  output logic [N_I2S-1:0] i2s_sd_out,
  // SSRAM port B (DSP side)
  input  logic        dsp_en,
  input  logic        dsp_we,
  input  logic [10:0] dsp_addr,
  input  logic [31:0] dsp_wdata,
  output logic [31:0] dsp_rdata,
  // reverberator result stream
  output logic        er_valid,
  output logic [15:0] er_data,
  output logic        reverb_busy,
  // LASP24 matrix address generator
  input  logic [3:0]  mx_code,
  input  logic [7:0]  mx_ar0,
  input  logic [7:0]  mx_ar1,
  output logic [7:0]  mx_addr,
  output logic        mx_valid,
  // LASP24 vector address generator
  input  logic [23:0] vx_instr,
  input  logic [9:0]  vx_ar0,
  input  logic [9:0]  vx_ar1,
  input  logic [13:0] vx_r_ext,
  input  logic [13:0] vx_r_fil,
  output logic [4:0]  vx_opcode,
  output logic [13:0] vx_fil_addr,
  output logic [13:0] vx_ext_addr,
  output logic [9:0]  vx_ram0_addr,
  output logic [9:0]  vx_ram1_addr,
  output logic [9:0]  vx_win_addr,
  output mem_sel_e    vx_vc_sel,
  output mem_sel_e    vx_va_sel,
  output mem_sel_e    vx_vb_sel,
  output logic        vx_valid,
  // LASP24 interrupt / DMA controller
  input  logic        dsp_clk,
  input  logic        dsp_rst_n,
  input  logic        dsp_irq_req_n,
  input  logic        dsp_dma_req,
  input  logic        dsp_instr_end,
  input  logic [15:0] dsp_pc,
  input  logic        dsp_dmem_ready,
  input  logic        dsp_mmem_ready,
  input  logic [15:0] dsp_vec_data,
  input  logic        dsp_isr_done,
  output logic        dsp_intr,
  output logic        dsp_dma_grant,
  output logic        dsp_save_req,
  output logic [15:0] dsp_save_pc,
  output logic        dsp_inta_n,
  output logic        dsp_vec_rd,
  output logic        dsp_pc_load,
  output logic [15:0] dsp_pc_value,
  output logic [2:0]  dsp_irq_state
);

  // ---------------- AHB ----------------
  ahb_m2s_t              m;
  ahb_s2m_t              r;
  ahb_s2m_t              s [AHB_SLAVES];
  logic [AHB_SLAVES-1:0] hsel;

  wrap8051 u_wrap (
    .hclk, .hresetn, .ale, .p0_in, .p0_out, .p0_oe, .p2, .rd_n, .wr_n,
    .m, .r
  );

  ahb_decoder u_dec (.hclk, .hresetn, .m, .hsel, .s, .r);

  ssram_ctrl u_ssram (
    .hclk, .hresetn, .hsel(hsel[AHB_SSRAM]), .m, .hready(r.hready), .s(s[AHB_SSRAM]),
    .b_en(dsp_en), .b_we(dsp_we), .b_addr(dsp_addr), .b_wdata(dsp_wdata), .b_rdata(dsp_rdata)
  );

  // ---------------- APB ----------------
  apb_req_t    apb    [APB_SLAVES];
  logic [31:0] prdata [APB_SLAVES];

  apb_bridge u_bridge (
    .hclk, .hresetn, .hsel(hsel[AHB_APB]), .m, .hready(r.hready), .s(s[AHB_APB]),
    .apb, .prdata
  );

  logic             uart_int_n, gpio_irq;
  logic [N_I2S-1:0] i2s_irq;
  logic        rx_valid;
  logic [15:0] rx_left, rx_right;

  uart_apb u_uart (
    .pclk(hclk), .presetn(hresetn), .apb(apb[APB_UART]), .prdata(prdata[APB_UART]),
    .rx(uart_rx), .tx(uart_tx), .int_n(uart_int_n)
  );

  gpio_apb u_gpio (
    .pclk(hclk), .presetn(hresetn), .apb(apb[APB_GPIO]), .prdata(prdata[APB_GPIO]),
    .pin_in(gpio_in), .pin_out(gpio_out), .pin_oe(gpio_oe), .irq(gpio_irq)
  );

  i2s_clkgen u_clkgen (.mclk, .rst_n(hresetn), .sck(i2s_sck), .ws(i2s_ws));

  i2s_apb u_i2s (
    .pclk(hclk), .presetn(hresetn), .apb(apb[APB_I2S]), .prdata(prdata[APB_I2S]),
    .irq(i2s_irq[0]), .sck(i2s_sck), .ws(i2s_ws), .sd_in(i2s_sd_in[0]),
    .sd_out(i2s_sd_out[0]), .rx_valid, .rx_left, .rx_right
  );

  // further I2S groups; their received pairs are read over the bus only
  localparam int unsigned I2S_SLOT [3] = '{APB_I2S, APB_I2S1, APB_I2S2};
  for (genvar g = 1; g < N_I2S; g++) begin : g_i2s
    logic        x_valid;
    logic [15:0] x_left, x_right;
    i2s_apb u_i2s (
      .pclk(hclk), .presetn(hresetn), .apb(apb[I2S_SLOT[g]]), .prdata(prdata[I2S_SLOT[g]]),
      .irq(i2s_irq[g]), .sck(i2s_sck), .ws(i2s_ws), .sd_in(i2s_sd_in[g]),
      .sd_out(i2s_sd_out[g]), .rx_valid(x_valid), .rx_left(x_left), .rx_right(x_right)
    );
  end

  intc_apb u_intc (
    .pclk(hclk), .presetn(hresetn), .apb(apb[APB_INTC]), .prdata(prdata[APB_INTC]),
    .irq_in({irq_ext, i2s_irq, !uart_int_n, gpio_irq}), .int0_n, .int1_n
  );

  reverb_fir u_reverb (
    .clk(hclk), .rst_n(hresetn), .apb(apb[APB_REVERB]), .prdata(prdata[APB_REVERB]),
    .in_valid(rx_valid), .in_l(rx_left), .in_r(rx_right),
    .out_valid(er_valid), .out_er(er_data), .busy(reverb_busy)
  );

  // ---------------- LASP24 blocks ----------------
  lasp_matrix_agu u_mx (
    .code(mx_code), .ar0(mx_ar0), .ar1(mx_ar1), .addr(mx_addr), .valid(mx_valid)
  );

  lasp_vector_agu u_vx (
    .instr(vx_instr), .ar0(vx_ar0), .ar1(vx_ar1), .r_ext(vx_r_ext), .r_fil(vx_r_fil),
    .opcode(vx_opcode), .fil_addr(vx_fil_addr), .ext_addr(vx_ext_addr),
    .ram0_addr(vx_ram0_addr), .ram1_addr(vx_ram1_addr), .win_addr(vx_win_addr),
    .vc_sel(vx_vc_sel), .va_sel(vx_va_sel), .vb_sel(vx_vb_sel), .valid(vx_valid)
  );

  lasp_irq_ctrl u_irq (
    .clk(dsp_clk), .rst_n(dsp_rst_n), .irq_req_n(dsp_irq_req_n), .dma_req(dsp_dma_req),
    .instr_end(dsp_instr_end), .pc(dsp_pc), .dmem_ready(dsp_dmem_ready),
    .mmem_ready(dsp_mmem_ready), .vec_data(dsp_vec_data), .isr_done(dsp_isr_done),
    .intr(dsp_intr), .dma_grant(dsp_dma_grant), .save_req(dsp_save_req),
    .save_pc(dsp_save_pc), .inta_n(dsp_inta_n), .vec_rd(dsp_vec_rd),
    .pc_load(dsp_pc_load), .pc_value(dsp_pc_value), .state_o(dsp_irq_state)
  );

endmodule
