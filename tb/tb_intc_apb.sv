// tb_intc_apb: programs random mode, enable and routing masks, drives random
// request patterns and compares INT0#, INT1#, the pending bits and the
// priority vector with a reference model, including rising-edge latching
// and clearing of edge-mode requests by writing 1.
module tb_intc_apb;
  import soc_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t apb;
  logic [31:0] prdata;
  logic [15:0] irq_in = '0;
  logic int0_n, int1_n;
  int checks = 0, failures = 0;

  intc_apb dut (.pclk(clk), .presetn(rst_n), .*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic apb_wr(input logic [11:0] a, input logic [7:0] d);
    @(negedge clk); apb = '{psel:1, penable:0, pwrite:1, paddr:a, pwdata:{4{d}}};
    @(negedge clk); apb.penable = 1;
    @(negedge clk); apb = '0;
  endtask

  task automatic apb_rd(input logic [11:0] a, output logic [7:0] d);
    @(negedge clk); apb = '{psel:1, penable:0, pwrite:0, paddr:a, pwdata:0};
    @(negedge clk); apb.penable = 1; #1 d = prdata[7:0];
    @(negedge clk); apb = '0;
  endtask

  task automatic wr16(input logic [11:0] a, input logic [15:0] v);
    apb_wr(a, v[7:0]); apb_wr(a + 12'd4, v[15:8]);
  endtask

  task automatic rd16(input logic [11:0] a, output logic [15:0] v);
    logic [7:0] d;
    apb_rd(a, d); v[7:0] = d; apb_rd(a + 12'd4, d); v[15:8] = d;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_int0 = 0, n_int1 = 0, n_edge = 0;

  initial begin
    logic [15:0] mode, en, route, latch, pend, act, v;
    logic [7:0] d;
    int top;
    apb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(int0_n && int1_n, "no interrupt after reset");
    for (int n = 0; n < 40; n++) begin
      mode = 16'($urandom); en = 16'($urandom); route = 16'($urandom);
      irq_in = '0;
      repeat (2) @(posedge clk);
      wr16(12'h000, mode); wr16(12'h008, en); wr16(12'h018, route);
      wr16(12'h010, 16'hFFFF);
      latch = '0;
      for (int s = 0; s < 4; s++) begin
        logic [15:0] nxt;
        nxt = 16'($urandom);
        latch |= nxt & ~irq_in & mode;
        @(negedge clk); irq_in = nxt;
        repeat (2) @(posedge clk);
        pend = (latch & mode) | (irq_in & ~mode);
        act = pend & en;
        @(negedge clk);
        check(int0_n == !(|(act & ~route)), "INT0# matches model");
        check(int1_n == !(|(act & route)), "INT1# matches model");
        if (!int0_n) n_int0++;
        if (!int1_n) n_int1++;
        rd16(12'h010, v);
        check(v == pend, "pending bits");
        top = -1;
        for (int i = 15; i >= 0; i--) if (act[i]) top = i;
        apb_rd(12'h020, d);
        check(d[7] == (top >= 0) && (top < 0 || d[3:0] == 4'(top)), "priority vector");
        if (s == 3 && latch != 0) begin
          logic [15:0] clr;
          clr = latch & 16'($urandom);
          wr16(12'h010, clr);
          latch &= ~clr;
          n_edge++;
          rd16(12'h010, v);
          check(v == ((latch & mode) | (irq_in & ~mode)), "edge latch cleared by writing 1");
        end
      end
    end
    check(n_int0 > 0 && n_int1 > 0 && n_edge > 0, "both outputs and edge clearing exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
