// tb_uart_apb: programs the UART divisor, sends bytes and checks the frame
// on TX bit by bit (start, 8 data LSB first, even parity, stop) and the bit
// time; drives frames into RX and checks the received byte, RX_READY, the
// interrupt (and its masking while the UART is selected) and the parity
// and framing error flags.
module tb_uart_apb;
  import soc_pkg::*;
  logic clk = 0, rst_n = 0;
  apb_req_t apb;
  logic [31:0] prdata;
  logic rx = 1, tx, int_n;
  int checks = 0, failures = 0;
  localparam int DIV = 5;
  localparam int BIT = 16 * DIV;

  uart_apb #(.CLK_HZ(40_000_000), .BAUD(9600)) dut (.pclk(clk), .presetn(rst_n), .*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  task automatic apb_wr(input logic [11:0] a, input logic [7:0] d);
    @(negedge clk); apb = '{psel:1, penable:0, pwrite:1, paddr:a, pwdata:{24'h0, d}};
    @(negedge clk); apb.penable = 1;
    @(negedge clk); apb = '0;
  endtask

  task automatic apb_rd(input logic [11:0] a, output logic [7:0] d);
    @(negedge clk); apb = '{psel:1, penable:0, pwrite:0, paddr:a, pwdata:0};
    @(negedge clk); apb.penable = 1; #1 d = prdata[7:0];
    @(negedge clk); apb = '0;
  endtask

  task automatic send_rx(input logic [7:0] b, input bit bad_parity, input bit bad_stop);
    logic [10:0] f;
    f = {!bad_stop, (^b) ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      rx = f[i];
      repeat (BIT) @(posedge clk);
    end
    rx = 1;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    apb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_rd(12'h00C, d);
    check(d == 8'(260), "divisor reset value = 40 MHz / (16 * 9600)");
    apb_wr(12'h00C, 8'(DIV));
    apb_wr(12'h010, 8'h00);
    // ---- transmit two bytes ----
    foreach (send_bytes[k]) begin
      logic [7:0] b;
      int t0, t1;
      b = send_bytes[k];
      apb_wr(12'h000, b);
      apb_rd(12'h008, d);
      check(d[1], "TX_BUSY while sending");
      wait (tx == 0);
      t0 = $time;
      repeat (BIT / 2) @(posedge clk);
      check(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk);
        check(tx == b[i], $sformatf("data bit %0d", i));
      end
      repeat (BIT) @(posedge clk);
      check(tx == ^b, "even parity");
      repeat (BIT) @(posedge clk);
      check(tx == 1, "stop bit");
      wait (dut.tx_busy == 0);
      t1 = $time;
      check((t1 - t0) / 10 >= 11 * BIT - DIV - 2 && (t1 - t0) / 10 <= 11 * BIT + 2, $sformatf("frame length 11 bits (%0d cycles)", (t1 - t0) / 10));
    end
    // ---- receive ----
    check(int_n == 1, "no interrupt before a byte");
    send_rx(8'h3C, 0, 0);
    repeat (5) @(posedge clk);
    check(int_n == 0, "interrupt after a byte");
    @(negedge clk); apb = '{psel:1, penable:0, pwrite:0, paddr:12'h008, pwdata:0}; #1;
    check(int_n == 1, "interrupt masked while selected");
    apb.penable = 1; #1 d = prdata[7:0];
    @(negedge clk); apb = '0;
    check(d[0] == 1 && d[2] == 0 && d[3] == 0, "RX_READY, no errors");
    apb_rd(12'h000, d);
    check(d == 8'h3C, "received byte");
    apb_rd(12'h008, d);
    check(d[0] == 0, "RX_READY cleared by read");
    check(int_n == 1, "interrupt cleared");
    send_rx(8'hA7, 1, 0);
    repeat (5) @(posedge clk);
    apb_rd(12'h008, d);
    check(d[2] == 1, "parity error flagged");
    apb_rd(12'h000, d);
    check(d == 8'hA7, "byte with bad parity");
    send_rx(8'h55, 0, 1);
    repeat (5) @(posedge clk);
    apb_rd(12'h008, d);
    check(d[3] == 1 && d[2] == 0, "framing error flagged");
    apb_rd(12'h000, d);
    for (int k = 0; k < 6; k++) begin
      logic [7:0] b;
      b = 8'($urandom);
      send_rx(b, 0, 0);
      repeat (BIT) @(posedge clk);
      apb_rd(12'h008, d);
      check(d[0] && !d[2] && !d[3], "random byte: clean status");
      apb_rd(12'h000, d);
      check(d == b, $sformatf("random byte %02h received", b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] send_bytes [2] = '{8'hA5, 8'h01};
endmodule
