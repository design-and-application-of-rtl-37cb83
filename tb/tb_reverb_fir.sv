// tb_reverb_fir: checks the pseudo-random FIR reverberator against a
// reference model at its full size (2500-sample buffers, 1024 taps).
//   1. LFSR coefficient generation: every coefficient read back over the
//      bus equals the model's LFSR/threshold rule.
//   2. Random sample streams under several ORDER/DEL2 settings: every
//      result equals the model (circular tap addressing with wrap, /32
//      scaling, zero skipping, 16-bit saturation) once the taps it needs
//      have been written, and the latency is max(nL, nR) + 4 clocks.
//   3. Coefficients written one by one over the bus, samples submitted
//      through the XL/XR registers, results read from ER and from the
//      output buffer Y.
//   4. A sample arriving while busy sets OVERRUN and is dropped; large
//      inputs with all taps negative saturate the output.
//   5. ORDER and DEL2 are clamped to their limits.
module tb_reverb_fir;
  import soc_pkg::*;
  localparam int BLOCK = 2500, NCOEF = 1024, NP = 512;
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

  // ---- reference model ----
  bit          nz [NCOEF], sg [NCOEF];
  logic [15:0] xl [BLOCK], xr [BLOCK];
  bit          known [BLOCK];
  int          wp = 0, order = NP, del2 = 0;

  function automatic int taddr(int j, int i);
    int a;
    a = j - (del2 + 2 * i);
    return a < 0 ? a + BLOCK : a;
  endfunction

  // expected result for the sample at wp; ok = 0 if a needed tap is unknown
  function automatic void model(output logic [15:0] er, output bit ok, output int lat, output bit satd);
    int accl, accr, sum, nl, nr;
    accl = 0; accr = 0; nl = 0; nr = 0; ok = 1;
    for (int i = 0; i < order; i++) begin
      if (nz[2*i]) begin
        int a;
        a = taddr(wp, i);
        if (!known[a]) ok = 0;
        accl += sg[2*i] ? ($signed(xl[a]) >>> 5) : -($signed(xl[a]) >>> 5);
        nl++;
      end
      if (nz[2*i+1]) begin
        int a;
        a = taddr(wp, i);
        if (!known[a]) ok = 0;
        accr += sg[2*i+1] ? ($signed(xr[a]) >>> 5) : -($signed(xr[a]) >>> 5);
        nr++;
      end
    end
    sum = accl + accr;
    satd = (sum > 32767) || (sum < -32768);
    er = sum > 32767 ? 16'h7FFF : sum < -32768 ? 16'h8000 : 16'(sum);
    lat = (nl > nr ? nl : nr) + 4;
  endfunction

  int n_checked = 0, n_sat = 0, n_ovr = 0, n_wrap = 0, n_skip_zero = 0;

  // one sample through the stream port; returns the result
  task automatic stream_sample(input logic [15:0] l, input logic [15:0] r, input bit big);
    logic [15:0] exp;
    bit ok, satd;
    int lat, cyc;
    @(negedge clk);
    in_valid = 1; in_l = l; in_r = r;
    xl[wp] = l; xr[wp] = r; known[wp] = 1;
    model(exp, ok, lat, satd);
    @(negedge clk);
    in_valid = 0;
    cyc = 0;   // clocks from the edge that accepts the sample to the one that gives out_valid
    while (!out_valid) begin @(negedge clk); cyc++; end
    if (ok) begin
      check(out_er == exp, $sformatf("result at j=%0d: got %h want %h", wp, out_er, exp));
      check(cyc == lat, $sformatf("latency %0d, want max(nL,nR)+4 = %0d", cyc, lat));
      n_checked++;
      if (satd) n_sat++;
      if (del2 + 2 * (order - 1) > wp) n_wrap++;
    end
    if (lat - 4 < 2 * order) n_skip_zero++;
    wp = (wp + 1) % BLOCK;
  endtask

  task automatic set_order_del2(input int o, input int d);
    order = o; del2 = d;
    wr16(12'h018, 16'(o));
    wr16(12'h020, 16'(d));
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v, lfsr, dens;
    logic [7:0] d;
    apb = '0;
    for (int i = 0; i < BLOCK; i++) begin known[i] = 0; xl[i] = 0; xr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- 5. clamps ----
    wr16(12'h018, 16'h03FF); rd16(12'h018, v);
    check(v == 16'(NP), "ORDER clamped to NCOEF/2");
    wr16(12'h020, 16'd2400); rd16(12'h020, v);
    check(v == 16'(BLOCK - NCOEF), "DEL2 clamped to BLOCK - NCOEF");

    // ---- 1. coefficient generation ----
    dens = 16'h0800 + 16'($urandom % 16'h1000);
    lfsr = 16'($urandom) | 16'h1;
    wr16(12'h008, dens); wr16(12'h010, lfsr);
    apb_wr(12'h000, 8'h01);
    apb_rd(12'h004, d);
    check(d[2] == 1, "GEN busy flag");
    do apb_rd(12'h004, d); while (d[2]);
    for (int k = 0; k < NCOEF; k++) begin
      nz[k] = (lfsr < dens) || (lfsr > ~dens);
      sg[k] = (lfsr < dens);
      lfsr = {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
    end
    for (int k = 0; k < NCOEF; k += 1 + ($urandom % 3)) begin
      wr16(12'h040, 16'(k));
      apb_rd(12'h048, d);
      check(d[0] == nz[k] && d[1] == (nz[k] && sg[k]) || !nz[k] && d[0] == 0,
            $sformatf("generated coefficient %0d", k));
    end

    // ---- 2. random streams ----
    apb_wr(12'h000, 8'h02);            // RUN
    set_order_del2(NP, 0);
    for (int n = 0; n < 1200; n++) stream_sample(16'($urandom), 16'($urandom), 0);
    set_order_del2(1 + $urandom % NP, $urandom % (BLOCK - NCOEF + 1));
    for (int n = 0; n < 1500; n++) stream_sample(16'($urandom), 16'($urandom), 0);
    set_order_del2(1 + $urandom % 64, $urandom % 200);
    for (int n = 0; n < 400; n++) stream_sample(16'($urandom), 16'($urandom), 0);

    // ---- 4. overrun ----
    @(negedge clk);
    in_valid = 1; in_l = 16'h1234; in_r = 16'h4321;
    xl[wp] = in_l; xr[wp] = in_r; known[wp] = 1;
    @(negedge clk);
    in_l = 16'hDEAD; in_r = 16'hBEEF;   // arrives while busy: dropped
    @(negedge clk);
    in_valid = 0;
    wait (out_valid);
    wp = (wp + 1) % BLOCK;
    apb_rd(12'h004, d);
    check(d[3] == 1, "OVERRUN set by a sample while busy");
    if (d[3]) n_ovr++;
    apb_wr(12'h004, 8'h0A);
    apb_rd(12'h004, d);
    check(d[3] == 0 && d[1] == 0, "OVERRUN and DONE cleared by writing 1");
    stream_sample(16'($urandom), 16'($urandom), 0);   // dropped sample left no trace

    // ---- 3. bus-written coefficients, bus-submitted samples ----
    apb_wr(12'h000, 8'h00);
    wr16(12'h040, 16'h0);
    for (int k = 0; k < NCOEF; k++) begin
      nz[k] = ($urandom % 5) == 0;
      sg[k] = $urandom % 2;
      apb_wr(12'h048, {6'b0, sg[k], nz[k]});
    end
    rd16(12'h040, v);
    check(v == 0, "CIDX advanced through all coefficients and wrapped");
    wr16(12'h040, 16'd77); apb_rd(12'h048, d);
    check(d[0] == nz[77] && d[1] == sg[77], "written coefficient reads back");
    apb_wr(12'h000, 8'h02);
    set_order_del2(NP, 3);
    for (int n = 0; n < 40; n++) begin
      logic [15:0] l, r, exp;
      bit ok, satd;
      int lat;
      l = 16'($urandom); r = 16'($urandom);
      xl[wp] = l; xr[wp] = r; known[wp] = 1;
      model(exp, ok, lat, satd);
      wr16(12'h028, l);
      wr16(12'h030, r);                 // writing XR high submits
      do apb_rd(12'h004, d); while (d[0]);
      check(d[1] == 1, "DONE set");
      apb_wr(12'h004, 8'h02);
      rd16(12'h038, v);
      if (ok) check(v == exp, "ER register");
      if (wp < NCOEF) begin
        logic [15:0] y;
        wr16(12'h040, 16'(wp));
        rd16(12'h04C, y);
        check(y == v, "output buffer holds the result");
      end
      wp = (wp + 1) % BLOCK;
    end

    // ---- 4b. saturation: all taps negative, full-scale inputs ----
    apb_wr(12'h000, 8'h00);
    wr16(12'h040, 16'h0);
    for (int k = 0; k < NCOEF; k++) begin
      nz[k] = 1; sg[k] = 1;
      apb_wr(12'h048, 8'h03);
    end
    apb_wr(12'h000, 8'h02);
    set_order_del2(NP, 0);
    for (int n = 0; n < 1100; n++) stream_sample(16'h7FFF - 16'($urandom % 64), 16'h7FFF, 1);

    check(n_checked > 2000, $sformatf("results compared (%0d)", n_checked));
    check(n_wrap > 0, "circular wrap of tap addresses exercised");
    check(n_skip_zero > 0, "zero taps skipped");
    check(n_sat > 0, "saturation exercised");
    check(n_ovr > 0, "overrun exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
