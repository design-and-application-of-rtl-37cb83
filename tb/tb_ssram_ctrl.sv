// tb_ssram_ctrl: fills the SSRAM through the DSP port, then runs random
// pipelined AHB transfers (byte, halfword and word, reads and writes, back
// to back and with idle cycles) on the lower half while the DSP port reads
// and writes the upper half, comparing both against a reference memory.
// Every AHB read must insert exactly one wait state and writes none.  It
// ends by reading each half through the other port, and by a same-word
// write clash that the AHB port must win.
module tb_ssram_ctrl;
  import soc_pkg::*;
  localparam int DEPTH = 2048;
  logic clk = 0, rst_n = 0;
  ahb_m2s_t m;
  ahb_s2m_t s;
  logic b_en = 0, b_we = 0;
  logic [10:0] b_addr = 0;
  logic [31:0] b_wdata = 0, b_rdata;
  int checks = 0, failures = 0;

  ssram_ctrl dut (.hclk(clk), .hresetn(rst_n), .hsel(1'b1), .m(m), .hready(s.hready), .s(s),
                  .b_en(b_en), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  logic [31:0] ref_mem [DEPTH];

  // ---- AHB master: address phase 'ap', data phase 'dp' ----
  typedef struct {
    bit valid, write;
    hsize_e size;
    logic [31:0] addr, data;
  } xfer_t;
  localparam xfer_t NO_XFER = '{valid: 0, write: 0, size: HSIZE_BYTE, addr: 0, data: 0};
  xfer_t ap, dp;
  xfer_t queue [$];
  int reads_done = 0, writes_done = 0, wait_cycles = 0;
  bit run = 0;

  function automatic logic [3:0] lanes_of(xfer_t t);
    case (t.size)
      HSIZE_BYTE: return 4'b0001 << t.addr[1:0];
      HSIZE_HALF: return t.addr[1] ? 4'b1100 : 4'b0011;
      default:    return 4'b1111;
    endcase
  endfunction

  always @(posedge clk) if (run) begin
    if (!s.hready) wait_cycles++;
    if (s.hready) begin
      if (dp.valid) begin
        logic [3:0] ln;
        ln = lanes_of(dp);
        if (dp.write) begin
          for (int l = 0; l < 4; l++)
            if (ln[l]) ref_mem[dp.addr[12:2]][8*l +: 8] = dp.data[8*l +: 8];
          writes_done++;
        end else begin
          check(s.hrdata == ref_mem[dp.addr[12:2]], $sformatf("AHB read %h", dp.addr));
          reads_done++;
        end
      end
      dp = ap;
      ap = NO_XFER;
      if (queue.size() != 0) ap = queue.pop_front();
      m.htrans <= ap.valid ? HTRANS_NONSEQ : HTRANS_IDLE;
      m.hwrite <= ap.write;
      m.hsize  <= ap.size;
      m.haddr  <= ap.addr;
      m.hwdata <= dp.data;
    end
  end

  function automatic xfer_t rand_xfer(input int lo_word, input int hi_word);
    xfer_t t;
    int w;
    t.valid = ($urandom % 5) != 0;
    t.write = $urandom % 2;
    t.size  = hsize_e'($urandom % 3);
    w = lo_word + $urandom % (hi_word - lo_word);
    t.addr  = {w[29:0], 2'b00};
    if (t.size == HSIZE_BYTE) t.addr[1:0] = 2'($urandom);
    if (t.size == HSIZE_HALF) t.addr[1]   = 1'($urandom);
    t.data  = $urandom;
    return t;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nreads;
    m = '0;
    ap = NO_XFER; dp = NO_XFER;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 11'(i); b_wdata = $urandom;
      ref_mem[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // random AHB traffic on words 0..1023, port B on 1024..2047
    for (int i = 0; i < 3000; i++) queue.push_back(rand_xfer(0, DEPTH / 2));
    nreads = 0;
    foreach (queue[i]) if (queue[i].valid && !queue[i].write) nreads++;
    run = 1;
    fork
      begin
        wait (queue.size() == 0);
        repeat (4) @(posedge clk);
      end
      begin
        logic [10:0] pend_addr;
        bit pend = 0;
        while (queue.size() != 0) begin
          @(negedge clk);
          if (pend) check(b_rdata == ref_mem[pend_addr], "port B read");
          pend = 0;
          b_en = $urandom % 2; b_we = $urandom % 2;
          b_addr = 11'(DEPTH / 2 + $urandom % (DEPTH / 2));
          b_wdata = $urandom;
          if (b_en && b_we) ref_mem[b_addr] = b_wdata;
          if (b_en && !b_we) begin pend = 1; pend_addr = b_addr; end
        end
        @(negedge clk); b_en = 0;
      end
    join
    check(reads_done == nreads, "all AHB reads completed");
    check(wait_cycles == nreads, $sformatf("one wait state per read (%0d waits, %0d reads)", wait_cycles, nreads));
    // cross check: AHB reads the DSP half, DSP reads the AHB half
    for (int i = 0; i < 200; i++) begin
      xfer_t t;
      t = '{valid: 1, write: 0, size: HSIZE_WORD, addr: 32'(DEPTH / 2 + $urandom % (DEPTH / 2)) << 2, data: 0};
      queue.push_back(t);
    end
    wait (queue.size() == 0);
    repeat (4) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk); b_en = 1; b_we = 0; b_addr = 11'($urandom % (DEPTH / 2));
      @(negedge clk); b_en = 0;
      check(b_rdata == ref_mem[b_addr], "port B reads AHB-written data");
    end
    // write clash on one word: the AHB port wins
    begin
      xfer_t t;
      t = '{valid: 1, write: 1, size: HSIZE_WORD, addr: 32'h40, data: 32'hA5A5_0001};
      queue.push_back(t);
      // data phase of this write is two clocks after it is queued
      @(negedge clk); @(negedge clk);
      b_en = 1; b_we = 1; b_addr = 11'h10; b_wdata = 32'h5A5A_0002;
      @(negedge clk); b_en = 0; b_we = 0;
      repeat (3) @(negedge clk);
      b_en = 1; b_addr = 11'h10;
      @(negedge clk); b_en = 0;
      check(b_rdata == 32'hA5A5_0001, "AHB port wins a same-word write clash");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
