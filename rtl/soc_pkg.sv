// soc_pkg: types and constants shared by the audio SoC platform.
//
// The platform is an AMBA 2 system: one AHB master (the 8051 wrapper), an
// AHB decoder that selects a slave from the address, a dual-port SSRAM on
// AHB and an AHB-to-APB bridge that serves the peripherals (UART, GPIO, I2S,
// interrupt controller and the reverberator coprocessor).  The AHB transfer
// type and size codes are the AMBA 2 ones.  The address map is this design's
// own choice: the document names the slaves but gives no addresses.  All
// addresses are byte addresses; the 8051 sees the low 16 bits.
package soc_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [2:0] {
    HSIZE_BYTE = 3'b000,
    HSIZE_HALF = 3'b001,
    HSIZE_WORD = 3'b010
  } hsize_e;

  localparam logic [1:0] HRESP_OKAY = 2'b00;

  // Master-to-slave half of the AHB bus (address and control, write data).
  typedef struct packed {
    htrans_e     htrans;
    logic        hwrite;
    hsize_e      hsize;
    logic [31:0] haddr;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Slave-to-master half of the AHB bus.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    logic [1:0]  hresp;
  } ahb_s2m_t;

  // APB request from the bridge to one peripheral.  Each peripheral owns a
  // 4 KB window, so it only sees the low 12 address bits.  Peripheral
  // registers are one byte wide and sit on word addresses (offset * 4), as
  // the 8051 master makes only 8-bit accesses.
  typedef struct packed {
    logic        psel;
    logic        penable;
    logic        pwrite;
    logic [11:0] paddr;
    logic [31:0] pwdata;
  } apb_req_t;

  // AHB slaves
  localparam int unsigned AHB_SLAVES  = 2;
  localparam int unsigned AHB_SSRAM   = 0;   // 0x0000 - 0x7FFF
  localparam int unsigned AHB_APB     = 1;   // 0x8000 - 0xFFFF

  // APB slaves, one 4 KB window each inside the APB region
  localparam int unsigned APB_SLAVES  = 7;
  localparam int unsigned APB_UART    = 0;   // 0x8000
  localparam int unsigned APB_GPIO    = 1;   // 0x9000
  localparam int unsigned APB_I2S     = 2;   // 0xA000
  localparam int unsigned APB_INTC    = 3;   // 0xB000
  localparam int unsigned APB_REVERB  = 4;   // 0xC000
  localparam int unsigned APB_I2S1    = 5;   // 0xD000
  localparam int unsigned APB_I2S2    = 6;   // 0xE000

  // I2S groups: group 0 at APB_I2S feeds the reverberator, groups 1 and 2
  // at APB_I2S1 and APB_I2S2.
  localparam int unsigned N_I2S = 3;

  // Interrupt controller input numbers; lower number = higher priority.
  localparam int unsigned IRQ_GPIO = 0;
  localparam int unsigned IRQ_UART = 1;
  localparam int unsigned IRQ_I2S  = 2;   // group g on input IRQ_I2S + g

endpackage
