// tb_ahb_decoder: two behavioural AHB slaves with random wait states sit
// behind the decoder, and a pipelined master sends random transfers to the
// SSRAM window, the APB window and unmapped addresses.  Checks that HSEL is
// one-hot and follows the address map, that each data phase returns the
// response of the slave addressed one transfer earlier (data tagged with
// the slave number), that the master stalls exactly while that slave holds
// HREADY low, and that unmapped addresses get the default slave's zero data
// without wait states.
module tb_ahb_decoder;
  import soc_pkg::*;
  logic clk = 0, rst_n = 0;
  ahb_m2s_t m;
  logic [AHB_SLAVES-1:0] hsel;
  ahb_s2m_t s [AHB_SLAVES];
  ahb_s2m_t r;
  int checks = 0, failures = 0;

  ahb_decoder dut (.hclk(clk), .hresetn(rst_n), .m(m), .hsel(hsel), .s(s), .r(r));

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---- slave models: tag data with the slave number and address ----
  int waits_left [AHB_SLAVES];
  logic [31:0] dph_addr [AHB_SLAVES];
  bit dph_act [AHB_SLAVES];
  int slave_waits = 0;

  for (genvar i = 0; i < AHB_SLAVES; i++) begin : g_slv
    assign s[i].hready = !(dph_act[i] && waits_left[i] > 0);
    assign s[i].hresp  = HRESP_OKAY;
    assign s[i].hrdata = {4'(i + 1), dph_addr[i][27:0]};
  end

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < AHB_SLAVES; i++) begin
      if (dph_act[i] && waits_left[i] > 0) begin
        waits_left[i]--;
      end else if (r.hready) begin
        dph_act[i] = 0;
        if (hsel[i] && m.htrans == HTRANS_NONSEQ) begin
          dph_act[i] = 1;
          dph_addr[i] = m.haddr;
          waits_left[i] = $urandom % 4;
          slave_waits += waits_left[i];
        end
      end
    end
  end

  // ---- master ----
  typedef struct {
    bit valid;
    logic [31:0] addr;
  } xfer_t;
  localparam xfer_t NO_XFER = '{valid: 0, addr: 0};
  xfer_t ap, dp;
  xfer_t queue [$];
  int stalls = 0, done = 0, n_def = 0;
  bit run = 0;

  always @(posedge clk) if (run) begin
    // address-phase decode
    if (ap.valid) begin
      check($onehot0(hsel), "HSEL one-hot");
      if (ap.addr[31:16] != 0) check(hsel == 0, "unmapped address selects no slave");
      else check(hsel == (ap.addr[15] ? 2'b10 : 2'b01), "HSEL follows the map");
    end
    if (!r.hready) stalls++;
    else begin
      if (dp.valid) begin
        done++;
        if (dp.addr[31:16] != 0) begin
          check(r.hrdata == 0, "default slave returns zero");
          n_def++;
        end else
          check(r.hrdata == {(dp.addr[15] ? 4'd2 : 4'd1), dp.addr[27:0]}, "response from the addressed slave");
      end
      dp = ap;
      ap = NO_XFER;
      if (queue.size() != 0) ap = queue.pop_front();
      m.htrans <= ap.valid ? HTRANS_NONSEQ : HTRANS_IDLE;
      m.hwrite <= 0;
      m.hsize  <= HSIZE_BYTE;
      m.haddr  <= ap.addr;
      m.hwdata <= 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nx;
    m = '0;
    ap = NO_XFER; dp = NO_XFER;
    for (int i = 0; i < AHB_SLAVES; i++) begin dph_act[i] = 0; waits_left[i] = 0; dph_addr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    nx = 0;
    for (int i = 0; i < 2000; i++) begin
      xfer_t t;
      t.valid = ($urandom % 5) != 0;
      t.addr  = {16'h0, 16'($urandom)};
      if ($urandom % 8 == 0) t.addr[31:16] = 16'($urandom) | 16'h1;
      if (t.valid) nx++;
      queue.push_back(t);
    end
    @(negedge clk);
    run = 1;
    wait (queue.size() == 0);
    repeat (10) @(posedge clk);
    check(done == nx, "every transfer completed");
    check(stalls == slave_waits, $sformatf("master stalled exactly for the slave waits (%0d/%0d)", stalls, slave_waits));
    check(n_def > 0, "default slave exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
