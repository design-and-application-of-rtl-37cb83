// tb_apb_bridge: drives random pipelined AHB reads and writes into the
// bridge, with five APB register-file models behind it.  Checks the APB
// protocol every cycle (one PSEL at a time, SETUP then ACCESS with stable
// address, control and write data), that each AHB transfer becomes exactly
// one APB transfer to the slot its address selects, the read data, reads of
// empty slots as zero, and the two wait states per transfer.
module tb_apb_bridge;
  import soc_pkg::*;
  localparam int NSLV = APB_SLAVES;
  logic clk = 0, rst_n = 0;
  ahb_m2s_t m;
  ahb_s2m_t s;
  apb_req_t apb [NSLV];
  logic [31:0] prdata [NSLV];
  int checks = 0, failures = 0;

  apb_bridge dut (.hclk(clk), .hresetn(rst_n), .hsel(1'b1), .m(m), .hready(s.hready),
                                 .s(s), .apb(apb), .prdata(prdata));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---- APB slave models ----
  logic [31:0] regs [NSLV][1024];
  logic [31:0] ref_regs [8][1024];
  int apb_xfers = 0;
  apb_req_t prev [NSLV];

  for (genvar i = 0; i < NSLV; i++) begin : g_slv
    assign prdata[i] = regs[i][apb[i].paddr[11:2]];
  end

  always @(posedge clk) if (rst_n) begin
    int nsel;
    nsel = 0;
    for (int i = 0; i < NSLV; i++) begin
      if (apb[i].psel) nsel++;
      if (apb[i].psel && apb[i].penable) begin
        check(prev[i].psel && !prev[i].penable, "ACCESS follows SETUP");
        check(prev[i].paddr == apb[i].paddr && prev[i].pwrite == apb[i].pwrite &&
              (!apb[i].pwrite || prev[i].pwdata == apb[i].pwdata), "address, control and data stable");
        if (apb[i].pwrite) regs[i][apb[i].paddr[11:2]] <= apb[i].pwdata;
        apb_xfers++;
      end
      if (prev[i].psel && !prev[i].penable)
        check(apb[i].psel && apb[i].penable, "SETUP is followed by ACCESS");
      prev[i] = apb[i];
    end
    check(nsel <= 1, "at most one PSEL");
  end

  // ---- AHB master ----
  typedef struct {
    bit valid, write;
    logic [31:0] addr, data;
  } xfer_t;
  localparam xfer_t NO_XFER = '{valid: 0, write: 0, addr: 0, data: 0};
  xfer_t ap, dp;
  xfer_t queue [$];
  int ahb_xfers = 0, wait_cycles = 0;
  bit run = 0;

  always @(posedge clk) if (run) begin
    if (!s.hready) wait_cycles++;
    if (s.hready) begin
      if (dp.valid) begin
        ahb_xfers++;
        if (dp.write) ref_regs[dp.addr[14:12]][dp.addr[11:2]] = dp.data;
        else check(s.hrdata == (dp.addr[14:12] < NSLV ? ref_regs[dp.addr[14:12]][dp.addr[11:2]] : 32'h0),
                   $sformatf("read %h", dp.addr));
      end
      dp = ap;
      ap = NO_XFER;
      if (queue.size() != 0) ap = queue.pop_front();
      m.htrans <= ap.valid ? HTRANS_NONSEQ : HTRANS_IDLE;
      m.hwrite <= ap.write;
      m.hsize  <= HSIZE_BYTE;
      m.haddr  <= ap.addr;
      m.hwdata <= dp.data;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nx, nmapped;
    m = '0;
    ap = NO_XFER; dp = NO_XFER;
    for (int i = 0; i < NSLV; i++) begin
      prev[i] = '0;
      for (int k = 0; k < 1024; k++) regs[i][k] = 0;
    end
    for (int i = 0; i < 8; i++) for (int k = 0; k < 1024; k++) ref_regs[i][k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    nx = 0; nmapped = 0;
    for (int i = 0; i < 2000; i++) begin
      xfer_t t;
      t.valid = ($urandom % 4) != 0;
      t.write = $urandom % 2;
      // slots 0..7, few registers per slot so reads hit written values
      t.addr  = 32'h8000 | (32'($urandom % 8) << 12) | (32'($urandom % 16) << 2);
      t.data  = $urandom;
      if (t.valid) nx++;
      if (t.valid && t.addr[14:12] < NSLV) nmapped++;
      queue.push_back(t);
    end
    run = 1;
    wait (queue.size() == 0);
    repeat (8) @(posedge clk);
    check(ahb_xfers == nx, "every AHB transfer completed");
    check(wait_cycles == 2 * nx, $sformatf("two wait states per transfer (%0d for %0d)", wait_cycles, nx));
    check(apb_xfers == nmapped, "one APB transfer per mapped AHB transfer, none for empty slots");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
