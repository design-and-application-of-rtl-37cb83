// reverb_fir: pseudo-random multi-tap FIR coprocessor for the early
// reflections of the reverberator, on the APB.
//
// Idea: the early reflections of a room are modelled by a long FIR filter
// whose taps are a sparse pseudo-random sequence of +1, 0 and -1.  With
// such taps no multiplier is needed and every zero tap can be skipped, so a
// 1024-coefficient filter costs only as many cycles as it has non-zero taps.
//
// Data path (two-stage pipeline, two MAC units working at the same time):
//  * Two input circular buffers (FCB), XL and XR, of BLOCK = 2500 16-bit
//    samples, and one output circular buffer (CCB) of the same size.  A new
//    sample pair is written at the write index j.
//  * MAC1 works on the left channel with the even coefficients h(2i), MAC2
//    on the right channel with the odd coefficients h(2i+1), for
//    i = 0 .. ORDER-1.  Tap i reads the sample delayed by DEL2 + 2i:
//        addr = j - (DEL2 + 2i)           if that is >= 0
//             = BLOCK - (DEL2 + 2i - j)    otherwise (circular wrap).
//  * Each cycle a MAC unit looks ahead for its next non-zero coefficient
//    (a priority search over its coefficient bits), reads that sample
//    (stage 1) and accumulates it (stage 2) in a 20-bit two's-complement
//    accumulator:  acc <- acc - h * (x >>> 5), i.e. y(j) = y(j-1) - h*x/32.
//  * When both units have run out of non-zero taps the two accumulators are
//    added, saturated to 16 bits, written to CCB[j] and given out as ER.
// A 20-bit unit sum holds 512 taps of |x/32| <= 1024 except for one
// extreme: all 512 taps +1 and every sample -32768 gives +2^19, which wraps.
// The adders keep the document's 20 bits all the same.
// Latency from a sample to its result is max(nL, nR) + 4 clocks, where nL,
// nR are the non-zero taps of each unit (the MAC unit itself has a latency
// of one clock).
//
// Coefficients live in NCOEF = 1024 one-bit "non-zero" and one-bit "sign"
// registers.  They are either written over the APB or generated by a 16-bit
// LFSR (x^16 + x^14 + x^13 + x^11 + 1): for each coefficient the LFSR value
// r gives h = -1 if r < DENS, h = +1 if r > 0xFFFF - DENS, else 0, so DENS
// is 2^16 * p / (2(1+p)) for the document's non-zero probability p.
//
// Registers (one byte each, byte offset):
//   0x00 CTRL   bit0 GEN: start coefficient generation (self-clearing)
//               bit1 RUN: accept samples
//   0x04 STAT   bit0 BUSY, bit1 DONE (write 1 clears), bit2 GEN busy,
//               bit3 OVERRUN: a sample arrived while busy (write 1 clears)
//   0x08/0x0C DENS lo/hi    0x10/0x14 SEED lo/hi
//   0x18/0x1C ORDER lo/hi   taps per MAC unit (1..NCOEF/2); sets the
//                           reverberation length
//   0x20/0x24 DEL2 lo/hi    first-reflection delay in samples (clamped to
//                           BLOCK - NCOEF)
//   0x28/0x2C XL lo/hi, 0x30/0x34 XR lo/hi: sample pair; writing XR hi
//                           submits the pair
//   0x38/0x3C ER lo/hi      last result
//   0x40/0x44 CIDX lo/hi    index for CVAL and Y
//   0x48 CVAL  coefficient at CIDX: bit0 non-zero, bit1 negative; a write
//              stores it and advances CIDX
//   0x4C/0x50 Y lo/hi       CCB[CIDX]
// Samples can also arrive as a stream (in_valid with in_l/in_r, e.g. from
// the I2S receiver); results also leave as a stream (out_valid, out_er).
//
// What follows the document: the pseudo-random +1/0/-1 taps, the 2500-entry
// circular buffers, the 1024 coefficient registers, two MAC units in a
// two-stage pipeline with zero-skipping, 20-bit adders, the /32 scaling and
// the recursion y(j) = y(j-1) - h*x/32.  This design's own choices: the
// even/odd split of the coefficients between the two units, the LFSR, the
// register map and the saturation of the output.
module reverb_fir
  import soc_pkg::*;
#(
  parameter int unsigned BLOCK = 2500,
  parameter int unsigned NCOEF = 1024,
  localparam int unsigned NP   = NCOEF / 2,
  localparam int unsigned AW   = $clog2(BLOCK),
  localparam int unsigned IW   = $clog2(NP + 1),
  localparam int unsigned CW   = $clog2(NCOEF)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  apb_req_t    apb,
  output logic [31:0] prdata,
  input  logic        in_valid,
  input  logic [15:0] in_l,
  input  logic [15:0] in_r,
  output logic        out_valid,
  output logic [15:0] out_er,
  output logic        busy
);

  localparam int unsigned ACC_W = 20;
  localparam int unsigned SHIFT = 5;
  localparam logic [AW-1:0] DEL2_MAX = AW'(BLOCK - NCOEF);

  typedef enum logic [2:0] {S_IDLE, S_GEN, S_SEARCH, S_MAC, S_STORE} state_e;
  state_e state;

  // ---------------- storage ----------------
  logic [15:0] xl_mem [BLOCK];
  logic [15:0] xr_mem [BLOCK];
  logic [15:0] y_mem  [BLOCK];
  logic [NCOEF-1:0] nz_q, sg_q;
  logic [NP-1:0]    nz_even, nz_odd;

  always_comb
    for (int unsigned k = 0; k < NP; k++) begin
      nz_even[k] = nz_q[2*k];
      nz_odd[k]  = nz_q[2*k+1];
    end

  // ---------------- registers ----------------
  logic        run_q, done_q, ovr_q;
  logic [15:0] dens_q, seed_q, xl_q, xr_q, er_q;
  logic [IW-1:0] order_q;
  logic [AW-1:0] del2_q, wp;
  logic [CW-1:0] cidx_q;
  logic        apb_wr;
  logic [5:0]  reg_a;

  assign apb_wr = apb.psel && apb.penable && apb.pwrite;
  assign reg_a  = apb.paddr[7:2];

  // ORDER and DEL2 are written a byte at a time into 16-bit registers; the
  // values used are clamped to their limits (and read back clamped).
  logic [15:0] order_raw, del2_raw;
  assign order_q = (order_raw > 16'(NP)) ? IW'(NP) : IW'(order_raw);
  assign del2_q  = (del2_raw > 16'(DEL2_MAX)) ? DEL2_MAX : AW'(del2_raw);

  // a sample pair to process this cycle
  logic        submit;
  logic [15:0] sub_l, sub_r;
  logic        apb_submit;
  assign apb_submit = apb_wr && reg_a == 6'd13;
  always_comb begin
    submit = 1'b0;
    sub_l  = in_l;
    sub_r  = in_r;
    if (apb_submit) begin
      submit = 1'b1;
      sub_l  = xl_q;
      sub_r  = {apb.pwdata[7:0], xr_q[7:0]};
    end else if (in_valid) begin
      submit = 1'b1;
    end
  end

  // ---------------- coefficient search ----------------
  logic [IW-1:0] idx_l, idx_r, nxt_l, nxt_r;
  logic          fnd_l, fnd_r;

  function automatic void find_next(input logic [NP-1:0] v, input logic [IW-1:0] from,
                                    input logic [IW-1:0] lim,
                                    output logic [IW-1:0] pos, output logic found);
    pos   = '0;
    found = 1'b0;
    for (int k = NP - 1; k >= 0; k--)
      if (v[k] && IW'(k) >= from && IW'(k) < lim) begin
        pos   = IW'(k);
        found = 1'b1;
      end
  endfunction

  always_comb begin
    find_next(nz_even, idx_l, order_q, nxt_l, fnd_l);
    find_next(nz_odd,  idx_r, order_q, nxt_r, fnd_r);
  end

  function automatic logic [AW-1:0] tap_addr(input logic [AW-1:0] j, input logic [AW-1:0] d2,
                                             input logic [IW-1:0] i);
    logic [AW:0] off;
    off = (AW+1)'(d2) + (AW+1)'({i, 1'b0});
    if ((AW+1)'(j) >= off) return AW'((AW+1)'(j) - off);
    else                   return AW'((AW+1)'(BLOCK) - (off - (AW+1)'(j)));
  endfunction

  // ---------------- MAC pipeline ----------------
  logic              v1_l, v1_r, s1_l, s1_r;     // stage-1 valid and sign
  logic [15:0]       rd_l, rd_r;                 // sample read in stage 1
  logic signed [ACC_W-1:0] acc_l, acc_r;
  logic signed [ACC_W-1:0] term_l, term_r;
  logic              mac_end;

  assign term_l = ACC_W'($signed(rd_l) >>> SHIFT);
  assign term_r = ACC_W'($signed(rd_r) >>> SHIFT);
  assign mac_end = (state == S_MAC) && !fnd_l && !fnd_r && !v1_l && !v1_r;

  logic signed [ACC_W:0] sum;
  logic [15:0]           sat;
  assign sum = (ACC_W+1)'(acc_l) + (ACC_W+1)'(acc_r);
  always_comb begin
    if (sum > 21'sd32767)       sat = 16'h7FFF;
    else if (sum < -21'sd32768) sat = 16'h8000;
    else                        sat = sum[15:0];
  end

  // ---------------- LFSR ----------------
  logic [15:0] lfsr;
  logic [CW:0] gen_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      run_q     <= 1'b0;
      done_q    <= 1'b0;
      ovr_q     <= 1'b0;
      dens_q    <= 16'd0;
      seed_q    <= 16'hACE1;
      order_raw <= 16'(NP);
      del2_raw  <= '0;
      xl_q      <= '0;
      xr_q      <= '0;
      er_q      <= '0;
      cidx_q    <= '0;
      wp        <= '0;
      idx_l     <= '0;
      idx_r     <= '0;
      v1_l      <= 1'b0;
      v1_r      <= 1'b0;
      s1_l      <= 1'b0;
      s1_r      <= 1'b0;
      acc_l     <= '0;
      acc_r     <= '0;
      lfsr      <= 16'h1;
      gen_i     <= '0;
      out_valid <= 1'b0;
      out_er    <= '0;
      nz_q      <= '0;
      sg_q      <= '0;
    end else begin
      out_valid <= 1'b0;

      // register writes
      if (apb_wr) begin
        unique case (reg_a)
          6'd1:  begin
            if (apb.pwdata[1]) done_q <= 1'b0;
            if (apb.pwdata[3]) ovr_q  <= 1'b0;
          end
          6'd2:  dens_q[7:0]  <= apb.pwdata[7:0];
          6'd3:  dens_q[15:8] <= apb.pwdata[7:0];
          6'd4:  seed_q[7:0]  <= apb.pwdata[7:0];
          6'd5:  seed_q[15:8] <= apb.pwdata[7:0];
          6'd6:  order_raw[7:0]  <= apb.pwdata[7:0];
          6'd7:  order_raw[15:8] <= apb.pwdata[7:0];
          6'd8:  del2_raw[7:0]   <= apb.pwdata[7:0];
          6'd9:  del2_raw[15:8]  <= apb.pwdata[7:0];
          6'd10: xl_q[7:0]  <= apb.pwdata[7:0];
          6'd11: xl_q[15:8] <= apb.pwdata[7:0];
          6'd12: xr_q[7:0]  <= apb.pwdata[7:0];
          6'd13: xr_q[15:8] <= apb.pwdata[7:0];
          6'd16: cidx_q <= CW'({cidx_q[CW-1:8], apb.pwdata[7:0]});
          6'd17: cidx_q <= CW'({apb.pwdata[CW-9:0], cidx_q[7:0]});
          6'd18: if (state != S_GEN) begin
            nz_q[cidx_q] <= apb.pwdata[0];
            sg_q[cidx_q] <= apb.pwdata[1];
            cidx_q       <= cidx_q + 1'b1;
          end
          default: ;
        endcase
      end

      unique case (state)
        S_IDLE: begin
          if (apb_wr && reg_a == 6'd0) begin
            run_q <= apb.pwdata[1];
            if (apb.pwdata[0]) begin
              state <= S_GEN;
              lfsr  <= (seed_q == 16'h0) ? 16'h1 : seed_q;
              gen_i <= '0;
            end
          end else if (submit && run_q) begin
            state      <= S_SEARCH;
          end
        end
        S_GEN: begin
          nz_q[gen_i[CW-1:0]] <= (lfsr < dens_q) || (lfsr > ~dens_q);
          sg_q[gen_i[CW-1:0]] <= (lfsr < dens_q);
          lfsr  <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
          gen_i <= gen_i + 1'b1;
          if (gen_i == (CW+1)'(NCOEF - 1)) state <= S_IDLE;
        end
        S_SEARCH: begin                      // step 2: loop counters, clear sums
          idx_l <= '0;
          idx_r <= '0;
          acc_l <= '0;
          acc_r <= '0;
          v1_l  <= 1'b0;
          v1_r  <= 1'b0;
          state <= S_MAC;
        end
        S_MAC: begin                         // steps 3-4: fetch and accumulate
          v1_l <= fnd_l;
          v1_r <= fnd_r;
          if (fnd_l) begin
            s1_l  <= sg_q[2*nxt_l];
            idx_l <= nxt_l + 1'b1;
          end
          if (fnd_r) begin
            s1_r  <= sg_q[2*nxt_r+1];
            idx_r <= nxt_r + 1'b1;
          end
          if (v1_l) acc_l <= s1_l ? acc_l + term_l : acc_l - term_l;
          if (v1_r) acc_r <= s1_r ? acc_r + term_r : acc_r - term_r;
          if (mac_end) state <= S_STORE;
        end
        S_STORE: begin                       // step 5: result into CCB
          er_q      <= sat;
          out_er    <= sat;
          out_valid <= 1'b1;
          done_q    <= 1'b1;
          wp        <= (wp == AW'(BLOCK - 1)) ? '0 : wp + 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase

      if (submit && run_q && state != S_IDLE) ovr_q <= 1'b1;
    end
  end

  assign busy = (state != S_IDLE);

  // Circular buffers: written on sample accept (FCB) and in step 5 (CCB),
  // read by the two MAC units in step 3.
  always_ff @(posedge clk) begin
    if (state == S_IDLE && !(apb_wr && reg_a == 6'd0) && submit && run_q) begin
      xl_mem[wp] <= sub_l;
      xr_mem[wp] <= sub_r;
    end
    if (state == S_STORE) y_mem[wp] <= sat;
    if (state == S_MAC && fnd_l) rd_l <= xl_mem[tap_addr(wp, del2_q, nxt_l)];
    if (state == S_MAC && fnd_r) rd_r <= xr_mem[tap_addr(wp, del2_q, nxt_r)];
  end

  always_comb begin
    unique case (reg_a)
      6'd0:    prdata = {30'h0, run_q, 1'b0};
      6'd1:    prdata = {28'h0, ovr_q, state == S_GEN, done_q, busy};
      6'd2:    prdata = {24'h0, dens_q[7:0]};
      6'd3:    prdata = {24'h0, dens_q[15:8]};
      6'd4:    prdata = {24'h0, seed_q[7:0]};
      6'd5:    prdata = {24'h0, seed_q[15:8]};
      6'd6:    prdata = {24'h0, 8'(order_q)};
      6'd7:    prdata = {24'h0, 8'(order_q >> 8)};
      6'd8:    prdata = {24'h0, del2_q[7:0]};
      6'd9:    prdata = {24'h0, 8'(del2_q >> 8)};
      6'd14:   prdata = {24'h0, er_q[7:0]};
      6'd15:   prdata = {24'h0, er_q[15:8]};
      6'd16:   prdata = {24'h0, cidx_q[7:0]};
      6'd17:   prdata = {24'h0, 8'(cidx_q >> 8)};
      6'd18:   prdata = {30'h0, sg_q[cidx_q], nz_q[cidx_q]};
      6'd19:   prdata = {24'h0, y_mem[AW'(cidx_q)][7:0]};
      6'd20:   prdata = {24'h0, y_mem[AW'(cidx_q)][15:8]};
      default: prdata = 32'h0;
    endcase
  end

endmodule
