// tb_soc_top: end-to-end test of the whole platform at its default sizes.
//
// An 8051 external-bus model (MOVX cycles with 12 MHz timing) is the only
// software; a codec model sits on the I2S pins, the UART is looped back,
// GPIO inputs are driven by the bench and the SSRAM's DSP port is used as
// the DSP would.  The test walks through every path of the platform:
//   * 8051 -> wrapper -> AHB -> SSRAM, read back through the DSP port and
//     the other way round (SSRAM read wait states)
//   * APB register access to every peripheral through the bridge
//   * GPIO outputs and a GPIO input-change interrupt on INT1#
//   * a UART byte sent at 9600 baud and received back, interrupt on INT0#,
//     with GPIO winning the priority while both are pending
//   * I2S pairs received from the codec (interrupt, RX registers) and TX
//     words sent to it; the other two I2S groups looped back on their own
//     pins, with their interrupts on inputs 3 and 4
//   * the reverberator fed by the I2S stream: exact results with two
//     non-zero taps (zero taps skipped), LFSR coefficient generation, and
//     an overrun caused by a bus-submitted sample while busy
//   * the LASP24 address generators and interrupt/DMA controller
// Each of these mechanisms is counted; one that never happened is a
// failure.
module tb_soc_top;
  import soc_pkg::*;
  import lasp_pkg::*;

  logic hclk = 0, hresetn = 1, mclk = 0;
  logic ale = 0, rd_n = 1, wr_n = 1;
  logic [7:0] p0_in = 0, p0_out, p2 = 0;
  logic p0_oe, int0_n, int1_n;
  logic [15:5] irq_ext = '0;
  logic uart_rx, uart_tx;
  logic [23:0] gpio_in = '0, gpio_out, gpio_oe;
  logic i2s_sck, i2s_ws, i2s_sd_in0 = 0;
  logic [2:0] i2s_sd_out;
  logic dsp_en = 0, dsp_we = 0;
  logic [10:0] dsp_addr = 0;
  logic [31:0] dsp_wdata = 0, dsp_rdata;
  logic er_valid, reverb_busy;
  logic [15:0] er_data;
  logic [3:0] mx_code = 0;
  logic [7:0] mx_ar0 = 0, mx_ar1 = 0, mx_addr;
  logic mx_valid;
  logic [23:0] vx_instr = 0;
  logic [9:0] vx_ar0 = 0, vx_ar1 = 0;
  logic [13:0] vx_r_ext = 0, vx_r_fil = 0;
  logic [4:0] vx_opcode;
  logic [13:0] vx_fil_addr, vx_ext_addr;
  logic [9:0] vx_ram0_addr, vx_ram1_addr, vx_win_addr;
  mem_sel_e vx_vc_sel, vx_va_sel, vx_vb_sel;
  logic vx_valid;
  logic dsp_clk = 0, dsp_rst_n = 0, dsp_irq_req_n = 1, dsp_dma_req = 0, dsp_instr_end = 0;
  logic [15:0] dsp_pc = 0, dsp_vec_data = 0;
  logic dsp_dmem_ready = 0, dsp_mmem_ready = 0, dsp_isr_done = 0;
  logic dsp_intr, dsp_dma_grant, dsp_save_req, dsp_inta_n, dsp_vec_rd, dsp_pc_load;
  logic [15:0] dsp_save_pc, dsp_pc_value;
  logic [2:0] dsp_irq_state;

  // groups 1 and 2 are looped back on their own pins; group 0 has the codec
  soc_top dut (.*, .i2s_sd_in({i2s_sd_out[2:1], i2s_sd_in0}));

  assign uart_rx = uart_tx;     // loopback

  always #12 hclk = !hclk;      // ~40 MHz bus clock
  always #27 mclk = !mclk;      // ~18.4 MHz I2S master clock
  always #10 dsp_clk = !dsp_clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  // ---------------- mechanism counters ----------------
  int n_ssram_wait = 0, n_apb_wait = 0, n_shared = 0, n_gpio_irq = 0, n_uart = 0,
      n_priority = 0, n_i2s_rx = 0, n_i2s_tx = 0, n_i2s_irq = 0, n_er_exact = 0,
      n_zero_skip = 0, n_overrun = 0, n_gen = 0, n_mx_reserved = 0, n_vx_invalid = 0,
      n_dsp_dma = 0, n_dsp_isr = 0, n_i2s_groups = 0;

  always @(posedge hclk) if (hresetn) begin
    if (dut.u_dec.dphase_sel == AHB_SSRAM && !dut.r.hready) n_ssram_wait++;
    if (dut.u_dec.dphase_sel == AHB_APB && !dut.r.hready) n_apb_wait++;
  end

  // ---------------- 8051 bus model ----------------
  task automatic addr_phase(input logic [15:0] a);
    p2 = a[15:8]; p0_in = a[7:0];
    ale = 1; #127; ale = 0; #43;
  endtask

  task automatic wr51(input logic [15:0] a, input logic [7:0] d);
    addr_phase(a);
    p0_in = d; #157;
    wr_n = 0; #400; wr_n = 1; #40;
    p0_in = 8'($urandom); #180;
  endtask

  task automatic rd51(input logic [15:0] a, output logic [7:0] d);
    addr_phase(a);
    p0_in = 8'($urandom); #157;
    rd_n = 0; #380;
    check(p0_oe, "8051 read data driven");
    d = p0_out; #20;
    rd_n = 1; #220;
  endtask

  localparam logic [15:0] UART = 16'h8000, GPIO = 16'h9000, I2S = 16'hA000,
                          INTC = 16'hB000, RVB = 16'hC000, I2S1 = 16'hD000, I2S2 = 16'hE000;

  // ---------------- codec model on the I2S pins ----------------
  localparam int W = 16;
  logic [W-1:0] snd_l, snd_r, cur_word, shr, got_l, got_r;
  logic [W-1:0] sent_q_l [$], sent_q_r [$];
  logic [W-1:0] want_tx_l = 0, want_tx_r = 0, frm_tx_l, frm_tx_r;
  bit want_tx = 0, frm_tx = 0, ws_seen = 0;
  bit have_left = 0;   // a whole left word has been sent
  int pos = 99;

  always @(negedge i2s_sck) begin
    #1;
    if (i2s_ws != ws_seen) begin
      pos = 0;
      ws_seen = i2s_ws;
      if (!i2s_ws) begin
        snd_l = W'($urandom); snd_r = W'($urandom);
        cur_word = snd_l;
        have_left = 1;
      end else cur_word = snd_r;
    end else begin
      pos++;
      // the group loads its TX words on this edge
      if (pos == 1 && !ws_seen) begin
        frm_tx_l = want_tx_l; frm_tx = want_tx;
      end
      if (pos == 1 && ws_seen) begin
        frm_tx_r = want_tx_r; frm_tx = frm_tx && want_tx;
      end
    end
    i2s_sd_in0 = (pos >= 1 && pos <= W) ? cur_word[W - pos] : 1'b0;
  end

  always @(posedge i2s_sck) if (pos >= 1 && pos <= W) begin
    shr = {shr[W-2:0], i2s_sd_out[0]};
    if (pos == W) begin
      if (!ws_seen) got_l = shr;
      else begin
        got_r = shr;
        if (frm_tx) begin
          check(got_l == frm_tx_l && got_r == frm_tx_r, "codec receives the TX words");
          n_i2s_tx++;
        end
        if (have_left) begin sent_q_l.push_back(snd_l); sent_q_r.push_back(snd_r); end
      end
    end
  end

  // received pairs as they reach the reverberator's stream input
  logic [W-1:0] last_rx_l = 0, last_rx_r = 0;
  bit rx_started = 0;
  always @(posedge hclk) if (dut.rx_valid) begin
    if (sent_q_l.size() == 0) check(!rx_started, "received pair has a sent pair");
    else begin
      logic [W-1:0] l, r;
      l = sent_q_l.pop_front(); r = sent_q_r.pop_front();
      check(dut.rx_left == l && dut.rx_right == r, "I2S pair received intact");
      n_i2s_rx++;
    end
    rx_started = 1;
    last_rx_l = dut.rx_left; last_rx_r = dut.rx_right;
  end

  // ---------------- reverberator stream watcher ----------------
  bit er_exact_mode = 0;
  logic [15:0] last_er = 0;
  int busy_len = 0, last_busy_len = 0;
  always @(posedge hclk) begin
    if (reverb_busy) busy_len++;
    else if (busy_len != 0) begin last_busy_len = busy_len; busy_len = 0; end
    if (er_valid && er_exact_mode) begin
      logic [15:0] want;
      // taps h(0) = h(1) = -1, all others zero, DEL2 = 0: ER = xl/32 + xr/32
      want = 16'(($signed(last_rx_l) >>> 5) + ($signed(last_rx_r) >>> 5));
      check(er_data == want, $sformatf("reverb result %h, want %h", er_data, want));
      n_er_exact++;
    end
    if (er_valid) last_er = er_data;
  end

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- LASP24 blocks (own clock) ----------------
  initial begin
    repeat (3) @(posedge dsp_clk);
    dsp_rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge dsp_clk);
      mx_code = 4'($urandom); mx_ar0 = 8'($urandom); mx_ar1 = 8'($urandom);
      vx_instr = 24'($urandom); vx_ar0 = 10'($urandom); vx_ar1 = 10'($urandom);
      vx_r_ext = 14'($urandom); vx_r_fil = 14'($urandom);
      if (n % 2) vx_instr[18:16] = MODE_VECTOR;
      #1;
      case (mx_code)
        4'b0000: check(mx_valid && mx_addr == mx_ar0, "matrix AGU AR0");
        4'b0010: check(mx_valid && mx_addr == mx_ar0 + mx_ar1, "matrix AGU AR0+AR1");
        4'b1010, 4'b1011, 4'b1110: begin check(!mx_valid, "matrix AGU reserved code"); n_mx_reserved++; end
        default: check(mx_valid, "matrix AGU valid code");
      endcase
      check(vx_opcode == vx_instr[23:19], "vector AGU opcode");
      check(vx_win_addr == vx_ar0, "vector AGU window address");
      if (vx_instr[9:8] == 2'b10) check(vx_ram0_addr == vx_ar0 + vx_ar1, "vector AGU RAM0 = AR0+AR1");
      check(vx_valid == (vx_instr[18:16] == MODE_VECTOR && vx_instr[3:2] != 2'b11), "vector AGU valid");
      if (!vx_valid) n_vx_invalid++;
    end
    // DMA request granted at an instruction boundary
    @(negedge dsp_clk); dsp_dma_req = 1; dsp_instr_end = 1;
    @(negedge dsp_clk); dsp_instr_end = 0;
    check(dsp_dma_grant, "DSP DMA granted");
    if (dsp_dma_grant) n_dsp_dma++;
    repeat (3) @(negedge dsp_clk); dsp_dma_req = 0;
    @(negedge dsp_clk);
    // one interrupt service
    dsp_irq_req_n = 0; @(negedge dsp_clk); dsp_irq_req_n = 1;
    repeat (5) @(negedge dsp_clk);
    dsp_pc = 16'h1234; dsp_vec_data = 16'h0040;
    dsp_instr_end = 1; @(negedge dsp_clk); dsp_instr_end = 0;
    check(dsp_save_req && dsp_save_pc == 16'h1234, "DSP PC saved");
    dsp_dmem_ready = 1; @(negedge dsp_clk); dsp_dmem_ready = 0;
    check(!dsp_inta_n, "DSP interrupt acknowledged");
    @(negedge dsp_clk); dsp_mmem_ready = 1; #1;
    check(dsp_pc_load && dsp_pc_value == 16'h0040, "DSP vector loaded");
    @(negedge dsp_clk); dsp_mmem_ready = 0;
    repeat (4) @(negedge dsp_clk);
    dsp_isr_done = 1; #1;
    check(dsp_pc_load && dsp_pc_value == 16'h1234, "DSP return address");
    @(negedge dsp_clk); dsp_isr_done = 0;
    @(negedge dsp_clk);
    check(dsp_irq_state == 0, "DSP back to monitoring");
    n_dsp_isr++;
  end

  // ---------------- 8051 program ----------------
  task automatic wait_pin(ref logic pin, input logic level, input int max_us, input string what);
    int t;
    t = 0;
    while (pin != level && t < max_us * 40) begin @(posedge hclk); t++; end
    check(pin == level, what);
  endtask

  initial begin
    logic [7:0] d, v;
    logic [15:0] a;
    logic [7:0] bytes [16];
    logic [15:0] addrs [16];
    #1 hresetn = 0;     // a falling edge for the asynchronous resets
    #200 hresetn = 1;
    #200;

    // ---- SSRAM shared buffer ----
    for (int i = 0; i < 16; i++) begin
      addrs[i] = 16'($urandom % 8192);
      for (int k = 0; k < i; k++) if (addrs[k][12:2] == addrs[i][12:2]) addrs[i] = 16'(i * 4 + (addrs[i] & 3));
      bytes[i] = 8'($urandom);
      wr51(addrs[i], bytes[i]);
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge hclk); dsp_en = 1; dsp_we = 0; dsp_addr = addrs[i][12:2];
      @(negedge hclk); dsp_en = 0;
      check(dsp_rdata[8*addrs[i][1:0] +: 8] == bytes[i], "DSP reads what the 8051 wrote");
      n_shared++;
    end
    for (int i = 0; i < 4; i++) begin
      logic [31:0] w;
      w = $urandom;
      @(negedge hclk); dsp_en = 1; dsp_we = 1; dsp_addr = 11'(1000 + i); dsp_wdata = w;
      @(negedge hclk); dsp_en = 0; dsp_we = 0;
      for (int b = 0; b < 4; b++) begin
        rd51(16'((1000 + i) * 4 + b), d);
        check(d == w[8*b +: 8], "8051 reads what the DSP wrote");
      end
      n_shared++;
    end

    // ---- interrupt controller: GPIO -> INT1#, UART and I2S -> INT0# ----
    wr51(INTC + 16'h00, 8'h00);        // all level-triggered
    wr51(INTC + 16'h08, 8'h07);        // enable GPIO, UART, I2S
    wr51(INTC + 16'h18, 8'h01);        // GPIO routed to INT1#
    rd51(INTC + 16'h18, d);
    check(d == 8'h01, "INTC route register");
    check(int0_n && int1_n, "no interrupt yet");

    // ---- GPIO ----
    begin
      logic [7:0] o;
      o = 8'($urandom);
      wr51(GPIO + 16'h20, 8'hFF);      // byte 0 outputs
      wr51(GPIO + 16'h00, o);
      check(gpio_out[7:0] == o && gpio_oe[7:0] == 8'hFF && gpio_oe[23:8] == 0, "GPIO outputs");
      gpio_in[23:16] = 8'($urandom);
      #200;
      rd51(GPIO + 16'h48, d);
      check(d == gpio_in[23:16], "GPIO inputs");
      wr51(GPIO + 16'h64, 8'hFF);      // change interrupts on byte 1
      gpio_in[9] = !gpio_in[9];
      wait_pin(int1_n, 0, 5, "GPIO change raises INT1#");
      rd51(INTC + 16'h20, v);
      check(v == 8'h80, "vector: GPIO");
      rd51(GPIO + 16'h84, d);
      check(d == 8'h02, "GPIO flag of the changed pin");
      wr51(GPIO + 16'h84, d);
      check(int1_n, "GPIO interrupt cleared");
      n_gpio_irq++;
    end

    // ---- UART loopback at the reset baud rate ----
    begin
      logic [7:0] b;
      b = 8'($urandom);
      rd51(UART + 16'h0C, d);
      check(d == 8'd4, "UART divisor low byte (260 = 0x104)");
      wr51(UART + 16'h00, b);
      rd51(UART + 16'h08, d);
      check(d[1], "UART transmitting");
      wait_pin(int0_n, 0, 1500, "UART byte raises INT0#");
      gpio_in[12] = !gpio_in[12];      // GPIO interrupt at the same time
      wait_pin(int1_n, 0, 5, "GPIO raises INT1# too");
      rd51(INTC + 16'h20, v);
      check(v == 8'h80, "GPIO wins priority over UART");
      if (v == 8'h80) n_priority++;
      rd51(GPIO + 16'h84, d);
      wr51(GPIO + 16'h84, d);
      rd51(INTC + 16'h20, v);
      check(v == 8'h81, "vector: UART");
      rd51(UART + 16'h08, d);
      check(d[0] && !d[2] && !d[3], "UART byte received cleanly");
      rd51(UART + 16'h00, d);
      check(d == b, "UART loopback data");
      check(int0_n, "UART interrupt cleared by reading");
      if (d == b) n_uart++;
    end

    // ---- I2S ----
    wr51(I2S + 16'h20, 8'h03);        // clear READY, enable interrupt
    for (int n = 0; n < 3; n++) begin
      logic [15:0] l, r, tl, tr;
      wait_pin(int0_n, 0, 60, "I2S pair raises INT0#");
      rd51(INTC + 16'h20, v);
      check(v == 8'h82, "vector: I2S");
      rd51(I2S + 16'h10, l[7:0]); rd51(I2S + 16'h14, l[15:8]);
      rd51(I2S + 16'h18, r[7:0]); rd51(I2S + 16'h1C, r[15:8]);
      check(l == last_rx_l && r == last_rx_r, "I2S RX registers");
      wr51(I2S + 16'h20, 8'h03);
      check(int0_n, "I2S interrupt cleared");
      n_i2s_irq++;
      tl = 16'($urandom); tr = 16'($urandom);
      want_tx = 0;
      wr51(I2S + 16'h00, tl[7:0]); wr51(I2S + 16'h04, tl[15:8]);
      wr51(I2S + 16'h08, tr[7:0]); wr51(I2S + 16'h0C, tr[15:8]);
      want_tx_l = tl; want_tx_r = tr; want_tx = 1;
    end
    wr51(I2S + 16'h20, 8'h01);        // interrupt off

    // ---- I2S groups 1 and 2, looped back, interrupts on inputs 3 and 4 ----
    wr51(INTC + 16'h08, 8'h1F);
    for (int g = 1; g <= 2; g++) begin
      logic [15:0] base, tl, tr, l, r;
      base = g == 1 ? I2S1 : I2S2;
      tl = 16'($urandom); tr = 16'($urandom);
      wr51(base + 16'h00, tl[7:0]); wr51(base + 16'h04, tl[15:8]);
      wr51(base + 16'h08, tr[7:0]); wr51(base + 16'h0C, tr[15:8]);
      repeat (3) @(posedge i2s_ws);   // words sent and received at least once
      wr51(base + 16'h20, 8'h03);     // clear READY, enable interrupt
      wait_pin(int0_n, 0, 60, "I2S group interrupt on INT0#");
      rd51(INTC + 16'h20, v);
      check(v == 8'(8'h80 + 2 + g), $sformatf("vector: I2S group %0d", g));
      rd51(base + 16'h10, l[7:0]); rd51(base + 16'h14, l[15:8]);
      rd51(base + 16'h18, r[7:0]); rd51(base + 16'h1C, r[15:8]);
      check(l == tl && r == tr, $sformatf("I2S group %0d loopback", g));
      wr51(base + 16'h20, 8'h01);     // clear READY, interrupt off
      check(int0_n, "I2S group interrupt cleared");
      if (l == tl && r == tr && v == 8'(8'h80 + 2 + g)) n_i2s_groups++;
    end

    // ---- reverberator: two non-zero taps, fed by the I2S stream ----
    wr51(RVB + 16'h08, 8'h00); wr51(RVB + 16'h0C, 8'h00);   // DENS = 0: all taps zero
    wr51(RVB + 16'h00, 8'h01);                              // GEN
    rd51(RVB + 16'h04, d);
    if (d[2]) n_gen++;
    do rd51(RVB + 16'h04, d); while (d[2]);
    wr51(RVB + 16'h40, 8'h00); wr51(RVB + 16'h44, 8'h00);   // CIDX = 0
    wr51(RVB + 16'h48, 8'h03); wr51(RVB + 16'h48, 8'h03);   // h(0) = h(1) = -1
    rd51(RVB + 16'h18, d); rd51(RVB + 16'h1C, v);
    check({v, d} == 16'd512, "ORDER at its default");
    @(negedge hclk);
    wait (!reverb_busy);
    er_exact_mode = 1;
    wr51(RVB + 16'h00, 8'h02);                              // RUN
    repeat (20) begin
      @(posedge hclk iff er_valid);
      @(negedge hclk);
      check(last_busy_len <= 8, $sformatf("zero taps skipped (%0d busy clocks)", last_busy_len));
      if (last_busy_len <= 8) n_zero_skip++;
    end
    rd51(RVB + 16'h38, d); rd51(RVB + 16'h3C, v);
    check({v, d} == last_er, $sformatf("ER register %h, want %h", {v, d}, last_er));
    er_exact_mode = 0;

    // ---- reverberator: dense LFSR taps, overrun ----
    wr51(RVB + 16'h00, 8'h00);
    wr51(RVB + 16'h08, 8'h00); wr51(RVB + 16'h0C, 8'h70);
    wr51(RVB + 16'h00, 8'h01);
    rd51(RVB + 16'h04, d);
    if (d[2]) n_gen++;
    do rd51(RVB + 16'h04, d); while (d[2]);
    wr51(RVB + 16'h40, 8'h00); wr51(RVB + 16'h44, 8'h00);
    rd51(RVB + 16'h48, d);
    wr51(RVB + 16'h04, 8'h0A);
    wr51(RVB + 16'h00, 8'h02);
    for (int n = 0; n < 60; n++) begin
      wr51(RVB + 16'h30, 8'($urandom)); wr51(RVB + 16'h34, 8'($urandom));   // submit
      rd51(RVB + 16'h04, d);
      if (d[3]) break;
    end
    check(d[3], "OVERRUN seen with dense taps");
    if (d[3]) n_overrun++;
    @(posedge hclk iff er_valid);
    @(negedge hclk);
    check(last_busy_len > 100, "dense taps keep the MAC units busy");
    wr51(RVB + 16'h00, 8'h00);                              // stop
    wait (!reverb_busy);
    wr51(RVB + 16'h04, 8'h0A);
    rd51(RVB + 16'h04, d);
    check(!d[3], "OVERRUN cleared");

    // ---- end: every mechanism must have happened ----
    wait (n_dsp_isr > 0 || $time > 30000000);
    check(n_ssram_wait > 0, "SSRAM read wait states");
    check(n_apb_wait > 0, "APB bridge wait states");
    check(n_shared >= 20, "shared buffer both ways");
    check(n_gpio_irq > 0, "GPIO interrupt");
    check(n_uart > 0, "UART loopback");
    check(n_priority > 0, "interrupt priority");
    check(n_i2s_rx > 20, "I2S pairs received");
    check(n_i2s_tx > 0, "I2S words transmitted");
    check(n_i2s_irq > 0, "I2S interrupt");
    check(n_i2s_groups == 2, "second and third I2S groups");
    check(n_er_exact >= 20, "reverb results from the I2S stream");
    check(n_zero_skip > 0, "zero-tap skipping");
    check(n_gen >= 2, "coefficient generation");
    check(n_overrun > 0, "reverb overrun");
    check(n_mx_reserved > 0, "matrix AGU reserved codes");
    check(n_vx_invalid > 0, "vector AGU invalid instructions");
    check(n_dsp_dma > 0, "LASP DMA grant");
    check(n_dsp_isr > 0, "LASP interrupt service");
    $display("mechanisms: ssram_wait=%0d apb_wait=%0d shared=%0d gpio_irq=%0d uart=%0d priority=%0d i2s_rx=%0d i2s_tx=%0d i2s_irq=%0d er_exact=%0d zero_skip=%0d gen=%0d overrun=%0d mx_reserved=%0d vx_invalid=%0d dsp_dma=%0d dsp_isr=%0d i2s_groups=%0d",
             n_ssram_wait, n_apb_wait, n_shared, n_gpio_irq, n_uart, n_priority, n_i2s_rx, n_i2s_tx,
             n_i2s_irq, n_er_exact, n_zero_skip, n_gen, n_overrun, n_mx_reserved, n_vx_invalid,
             n_dsp_dma, n_dsp_isr, n_i2s_groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
