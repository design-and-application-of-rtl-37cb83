// tb_i2s_clkgen: measures the generated clocks in master-clock cycles: SCK
// must have a period of 6 cycles (18.432 MHz / 6 = 3.072 MHz), WS a period
// of 64 SCK periods (48 kHz) with 32 in each half, and WS may change only
// together with a falling SCK edge.  Reset is released at a random time.
module tb_i2s_clkgen;
  logic mclk = 0, rst_n = 0;
  logic sck, ws;
  int checks = 0, failures = 0;

  i2s_clkgen dut (.*);

  always #27 mclk = !mclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge mclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, last_sck_rise = -1, last_ws_edge = -1, sck_rises = 0, ws_edges = 0;
    logic sck_q, ws_q;
    repeat (2 + $urandom % 7) @(posedge mclk);
    rst_n = 1;
    sck_q = sck; ws_q = ws;
    while (ws_edges < 12) begin
      @(posedge mclk); #1;
      cyc++;
      if (sck && !sck_q) begin
        if (last_sck_rise >= 0) check(cyc - last_sck_rise == 6, "SCK period is 6 master clocks");
        last_sck_rise = cyc;
        sck_rises++;
      end
      if (last_sck_rise >= 0)
        check(sck == ((cyc - last_sck_rise) % 6 < 3), "SCK duty cycle 50%");
      if (ws != ws_q) begin
        check(!sck && sck_q, "WS changes with the falling SCK edge");
        if (last_ws_edge >= 0) check(cyc - last_ws_edge == 32 * 6, "32 SCK periods per channel");
        last_ws_edge = cyc;
        ws_edges++;
      end
      sck_q = sck; ws_q = ws;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
