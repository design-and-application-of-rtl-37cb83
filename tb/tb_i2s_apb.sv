// tb_i2s_apb: one I2S group clocked by the platform clock generator, with a
// model of an external codec on the serial side.  The codec sends a random
// left/right pair every frame (MSB one SCK after the WS change) and records
// what the group transmits.  Checks: every received pair appears on the
// stream output and in the RX registers; READY and the interrupt follow
// the enable and clear by writing 1; TX words written by the bus come out on
// SD in the next frame.
module tb_i2s_apb;
  import soc_pkg::*;
  localparam int W = 16;
  logic clk = 0, mclk = 0, rst_n = 1;
  apb_req_t apb;
  logic [31:0] prdata;
  logic irq, sck, ws, sd_in = 0, sd_out, rx_valid;
  logic [W-1:0] rx_left, rx_right;
  int checks = 0, failures = 0;

  i2s_clkgen u_gen (.mclk(mclk), .rst_n(rst_n), .sck(sck), .ws(ws));
  i2s_apb dut (.pclk(clk), .presetn(rst_n), .*);

  always #13 clk = !clk;
  always #27 mclk = !mclk;

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

  // ---- codec model ----
  logic [W-1:0] sent_l, sent_r, cur_word;
  logic [W-1:0] exp_q_l [$], exp_q_r [$];
  logic [W-1:0] got_l, got_r, shr;
  logic [W-1:0] tx_l = 0, tx_r = 0, want_l, want_r;
  logic tx_valid = 0, want_valid = 0;
  logic ws_seen = 0;
  bit have_left = 0;   // a whole left word has been sent
  int pos = 99, frames_out = 0;

  always @(negedge sck) begin
    #1;
    if (ws != ws_seen) begin
      pos = 0;
      ws_seen = ws;
      if (!ws) begin
        // a new frame starts with the left slot
        sent_l = W'($urandom); sent_r = W'($urandom);
        cur_word = sent_l;
        have_left = 1;
        want_l = tx_l; want_r = tx_r; want_valid = tx_valid;
      end else begin
        cur_word = sent_r;
      end
    end else begin
      pos++;
    end
    sd_in = (pos >= 1 && pos <= W) ? cur_word[W - pos] : 1'b0;
  end

  always @(posedge sck) begin
    if (pos >= 1 && pos <= W) begin
      shr = {shr[W-2:0], sd_out};
      if (pos == W) begin
        if (!ws_seen) got_l = shr;
        else begin
          got_r = shr;
          if (want_valid) begin
            check(got_l == want_l && got_r == want_r, "transmitted pair matches TX registers");
            frames_out++;
          end
          if (pos == W) begin
            if (have_left) begin exp_q_l.push_back(sent_l); exp_q_r.push_back(sent_r); end
          end
        end
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frames_in = 0, skipped = 0;
  logic [W-1:0] pair_l, pair_r;

  always @(posedge clk) if (rx_valid) begin
    if (exp_q_l.size() == 0) skipped++;
    else begin
      pair_l = exp_q_l.pop_front(); pair_r = exp_q_r.pop_front();
      check(rx_left == pair_l && rx_right == pair_r, "received pair on the stream");
      frames_in++;
    end
  end

  initial begin
    logic [7:0] d, lo, hi;
    apb = '0;
    #1 rst_n = 0;       // a falling edge for the asynchronous resets
    repeat (3) @(posedge clk);
    rst_n = 1;
    apb_rd(12'h020, d);
    check(d == 0, "status clear after reset");
    while (frames_in < 12) begin
      @(posedge clk iff rx_valid);
      repeat (2) @(posedge clk);
      check(irq == (frames_in > 4), "irq follows READY and the enable");
      apb_rd(12'h010, lo); apb_rd(12'h014, hi);
      check({hi, lo} == rx_left, "RXL register");
      apb_rd(12'h018, lo); apb_rd(12'h01C, hi);
      check({hi, lo} == rx_right, "RXR register");
      apb_rd(12'h020, d);
      check(d[0] == 1, "READY set");
      apb_wr(12'h020, {6'b0, frames_in >= 4, 1'b1});
      apb_rd(12'h020, d);
      check(d[0] == 0, "READY cleared by writing 1");
      check(irq == 0, "irq drops with READY");
      // new words to send next frame
      tx_l = W'($urandom); tx_r = W'($urandom);
      apb_wr(12'h000, tx_l[7:0]); apb_wr(12'h004, tx_l[15:8]);
      apb_wr(12'h008, tx_r[7:0]); apb_wr(12'h00C, tx_r[15:8]);
      tx_valid = 1;
      apb_rd(12'h008, lo); apb_rd(12'h00C, hi);
      check({hi, lo} == tx_r, "TXR reads back");
    end
    check(skipped <= 1, "at most the first, partial frame is skipped");
    check(frames_out >= 8, "transmit path exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
