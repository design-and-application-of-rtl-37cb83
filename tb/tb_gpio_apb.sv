// tb_gpio_apb: writes random values to the output latches and direction
// bits and checks the pins, reads random pin values back through the input
// synchroniser, and checks that a changing input raises its flag and the
// interrupt only when enabled, and that writing 1 clears the flag.
module tb_gpio_apb;
  import soc_pkg::*;
  localparam int W = 24;
  logic clk = 0, rst_n = 0;
  apb_req_t apb;
  logic [31:0] prdata;
  logic [W-1:0] pin_in = '0, pin_out, pin_oe;
  logic irq;
  int checks = 0, failures = 0;

  gpio_apb dut (.pclk(clk), .presetn(rst_n), .*);

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

  task automatic wr24(input int grp, input logic [W-1:0] v);
    for (int k = 0; k < 3; k++) apb_wr(12'(grp * 32 + k * 4), v[k*8 +: 8]);
  endtask

  task automatic rd24(input int grp, output logic [W-1:0] v);
    logic [7:0] d;
    for (int k = 0; k < 3; k++) begin apb_rd(12'(grp * 32 + k * 4), d); v[k*8 +: 8] = d; end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v, o, dir, ie;
    apb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pin_oe == 0 && pin_out == 0, "pins are inputs after reset");
    for (int n = 0; n < 20; n++) begin
      o = W'($urandom); dir = W'($urandom);
      wr24(0, o); wr24(1, dir);
      check(pin_out == o, "output latches drive the pins");
      check(pin_oe == dir, "direction bits drive the enables");
      rd24(0, v); check(v == o, "OUT reads back");
      rd24(1, v); check(v == dir, "DIR reads back");
      pin_in = W'($urandom);
      repeat (4) @(posedge clk);
      rd24(2, v); check(v == pin_in, "IN reads the pins");
    end
    // change interrupts
    wr24(4, '1);
    rd24(4, v); check(v == 0, "flags clear");
    check(irq == 0, "no interrupt");
    ie = W'($urandom) | W'(1);
    wr24(3, ie);
    for (int n = 0; n < 10; n++) begin
      logic [W-1:0] flip;
      flip = W'($urandom);
      pin_in = pin_in ^ flip;
      repeat (4) @(posedge clk);
      rd24(4, v);
      check(v == (flip & ie & ~dir), "flags follow changed, enabled input pins");
      check(irq == |(flip & ie & ~dir), "irq is the OR of flags");
      wr24(4, v);
      rd24(4, v); check(v == 0, "write 1 clears the flags");
      check(irq == 0, "irq drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
