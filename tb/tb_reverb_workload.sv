// tb_reverb_workload: runs the reverberator's reference workload in real
// time.  A mono music-like signal of 20,282 samples (44.1 kHz, 16-bit) is
// fed to both channels of the filter at its default size (2500-sample
// buffers, 1024 coefficients, 512 taps per MAC unit), one frame every 907
// clocks, which is one 44.1 kHz sample period at a 40 MHz clock.
//
// Coefficients are made by the hardware generator with the threshold for
// 14,400 non-zero taps per second (p = 2*14400/44100, DENS = 12946) and
// checked against an independent copy of the generator rule.  Each result
// is compared with a reference model of the filter once every tap it needs
// has been written, and its latency must fit in the frame period.  At the
// end no frame may have been dropped (no OVERRUN) and every sample must
// have given exactly one result.
module tb_reverb_workload;
  import soc_pkg::*;
  localparam int BLOCK = 2500, NCOEF = 1024, NP = 512;
  localparam int NSAMP = 20282;
  localparam int FRAME = 907;                 // 40 MHz / 44.1 kHz
  localparam logic [15:0] DENS = 16'd12946;

  logic clk = 0, rst_n = 0;
  apb_req_t apb;
  logic [31:0] prdata;
  logic in_valid = 0;
  logic [15:0] in_l = 0, in_r = 0;
  logic out_valid, busy;
  logic [15:0] out_er;
  int checks = 0, failures = 0;

  reverb_fir dut (.clk(clk), .rst_n(rst_n), .*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s @%0t", what, $time);
    end
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

  // ---- reference model ----
  bit          nz [NCOEF], sg [NCOEF];
  logic [15:0] xs [BLOCK];
  int          nwritten = 0, wp = 0;

  // result for the newest sample (at wp); both channels carry the same signal
  function automatic void model(output logic [15:0] er, output int lat);
    int accl, accr, sum, nl, nr, a;
    accl = 0; accr = 0; nl = 0; nr = 0;
    for (int i = 0; i < NP; i++) begin
      a = wp - 2 * i;
      if (a < 0) a += BLOCK;
      if (nz[2*i]) begin
        accl += sg[2*i] ? ($signed(xs[a]) >>> 5) : -($signed(xs[a]) >>> 5);
        nl++;
      end
      if (nz[2*i+1]) begin
        accr += sg[2*i+1] ? ($signed(xs[a]) >>> 5) : -($signed(xs[a]) >>> 5);
        nr++;
      end
    end
    sum = accl + accr;
    er  = sum > 32767 ? 16'h7FFF : sum < -32768 ? 16'h8000 : 16'(sum);
    lat = (nl > nr ? nl : nr) + 4;
  endfunction

  // music-like source: two slow triangle waves plus a little noise
  int ph1 = 0, ph2 = 0;
  function automatic logic [15:0] next_sample();
    int t1, t2, v;
    ph1 = (ph1 + 37) % 2000;
    ph2 = (ph2 + 113) % 1400;
    t1 = ph1 < 1000 ? ph1 - 500 : 1500 - ph1;      // -500..500
    t2 = ph2 < 700 ? ph2 - 350 : 1050 - ph2;       // -350..350
    v  = t1 * 24 + t2 * 20 + int'($urandom_range(0, 2047)) - 1024;
    return 16'(v);
  endfunction

  int n_out = 0;
  always @(posedge clk) if (out_valid) n_out++;

  initial begin
    repeat (NSAMP * FRAME + 200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seed, lfsr, x, exp;
    logic [7:0] d;
    int lat, cyc, n_checked, max_lat, n_nz;
    apb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // coefficients from the hardware generator
    seed = 16'($urandom_range(1, 65535));
    wr16(12'h008, DENS);
    wr16(12'h010, seed);
    apb_wr(12'h000, 8'h01);
    do apb_rd(12'h004, d); while (d[2]);
    lfsr = seed; n_nz = 0;
    for (int i = 0; i < NCOEF; i++) begin
      nz[i] = (lfsr < DENS) || (lfsr > 16'hFFFF - DENS);
      sg[i] = lfsr < DENS;
      if (nz[i]) n_nz++;
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    end
    for (int i = 0; i < NCOEF; i++) begin
      wr16(12'h040, 16'(i));
      apb_rd(12'h048, d);
      check(d[1:0] == {sg[i], nz[i]}, $sformatf("coefficient %0d", i));
    end
    $display("non-zero taps: %0d of %0d (expected about 404)", n_nz, NCOEF);
    check(n_nz > 300 && n_nz < 520, "density of non-zero taps");

    // real-time stream
    apb_wr(12'h000, 8'h02);                   // RUN
    n_checked = 0; max_lat = 0;
    for (int s = 0; s < NSAMP; s++) begin
      x = next_sample();
      @(negedge clk);
      in_valid = 1; in_l = x; in_r = x;
      xs[wp] = x;
      nwritten++;
      model(exp, lat);
      @(negedge clk);
      in_valid = 0;
      cyc = 0;
      while (!out_valid && cyc < FRAME) begin @(negedge clk); cyc++; end
      if (nwritten >= 2 * NP) begin
        check(out_er == exp, $sformatf("sample %0d: got %h want %h", s, out_er, exp));
        check(cyc == lat, $sformatf("sample %0d: latency %0d want %0d", s, cyc, lat));
        n_checked++;
      end
      check(cyc < FRAME - 2, $sformatf("sample %0d: result within one frame", s));
      if (cyc > max_lat) max_lat = cyc;
      wp = (wp + 1) % BLOCK;
      repeat (FRAME - cyc - 2) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    apb_rd(12'h004, d);
    check(!d[3], "no frame dropped (OVERRUN clear)");
    check(n_out == NSAMP, $sformatf("results %0d, samples %0d", n_out, NSAMP));
    check(n_checked > NSAMP - 2 * NP - 1, "results compared with the model");
    $display("samples %0d, compared %0d, longest latency %0d of %0d clocks per frame",
             NSAMP, n_checked, max_lat, FRAME);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
