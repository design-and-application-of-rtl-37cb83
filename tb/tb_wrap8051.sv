// tb_wrap8051: an 8051 external-bus model (12 MHz MOVX timing: ALE pulse,
// multiplexed P0, P2, RD#/WR# of about 400 ns) drives the wrapper, and a
// behavioural AHB slave with random wait states and a 64 KB byte memory
// answers it.  Checks that each MOVX becomes exactly one NONSEQ byte
// transfer to {P2, low address}, write data on all four lanes, read data
// taken from the right byte lane and driven on P0 only while RD# is low,
// for random addresses and data, including read-after-write.
module tb_wrap8051;
  import soc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ale = 0, rd_n = 1, wr_n = 1;
  logic [7:0] p0_in = 0, p0_out, p2 = 0;
  logic p0_oe;
  ahb_m2s_t m;
  ahb_s2m_t r;
  int checks = 0, failures = 0;

  wrap8051 dut (.hclk(clk), .hresetn(rst_n), .*);

  always #12 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---- AHB slave model ----
  logic [7:0] mem [65536];
  bit dph = 0, dph_wr = 0;
  logic [15:0] dph_addr;
  int waits = 0, n_xfer = 0, n_wait = 0;
  logic [31:0] noise = 0;

  assign r.hready = !(dph && waits > 0);
  assign r.hresp  = HRESP_OKAY;
  always_comb begin
    r.hrdata = noise;
    r.hrdata[8*dph_addr[1:0] +: 8] = mem[dph_addr];
  end

  always @(posedge clk) if (rst_n) begin
    if (dph && waits > 0) begin
      waits--;
      n_wait++;
    end else begin
      if (dph && dph_wr) begin
        check(m.hwdata == {4{m.hwdata[7:0]}}, "write data on all four lanes");
        mem[dph_addr] = m.hwdata[7:0];
      end
      dph = 0;
      if (m.htrans == HTRANS_NONSEQ) begin
        check(m.hsize == HSIZE_BYTE && m.haddr[31:16] == 0, "byte transfer in the 64 KB space");
        dph = 1;
        dph_wr = m.hwrite;
        dph_addr = m.haddr[15:0];
        waits = $urandom % 6;
        noise = $urandom;
        n_xfer++;
      end else check(m.htrans == HTRANS_IDLE, "only IDLE or NONSEQ");
    end
  end

  always @(posedge clk) if (rst_n && p0_oe) check(!rd_n, "P0 driven only while RD# is low");

  // ---- 8051 bus model ----
  task automatic addr_phase(input logic [15:0] a);
    p2 = a[15:8]; p0_in = a[7:0];
    ale = 1; #127; ale = 0; #43;
  endtask

  task automatic movx_wr(input logic [15:0] a, input logic [7:0] d);
    addr_phase(a);
    p0_in = d; #157;
    wr_n = 0; #400; wr_n = 1; #40;
    p0_in = 8'($urandom); #180;
  endtask

  task automatic movx_rd(input logic [15:0] a, output logic [7:0] d);
    addr_phase(a);
    p0_in = 8'($urandom); #157;
    rd_n = 0; #380;
    check(p0_oe, "P0 driven at the end of RD#");
    d = p0_out; #20;
    rd_n = 1; #220;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ref_mem [65536];
    logic [15:0] written [$];
    logic [15:0] a;
    logic [7:0] d;
    int nmovx = 0;
    for (int i = 0; i < 65536; i++) begin mem[i] = 8'(i * 7); ref_mem[i] = 8'(i * 7); end
    #100 rst_n = 1;
    #100;
    for (int n = 0; n < 600; n++) begin
      case ($urandom % 3)
        0: begin
          a = 16'($urandom); d = 8'($urandom);
          movx_wr(a, d); ref_mem[a] = d; written.push_back(a);
        end
        1: begin
          a = 16'($urandom);
          movx_rd(a, d);
          check(d == ref_mem[a], $sformatf("read %h", a));
        end
        default: if (written.size() != 0) begin
          a = written[$urandom % written.size()];
          movx_rd(a, d);
          check(d == ref_mem[a], $sformatf("read back %h", a));
        end else begin
          movx_rd(16'h0, d);
          check(d == ref_mem[0], "read 0");
        end
      endcase
      nmovx++;
    end
    #200;
    check(n_xfer == nmovx, $sformatf("one AHB transfer per MOVX (%0d/%0d)", n_xfer, nmovx));
    check(n_wait > 0, "slave wait states exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
