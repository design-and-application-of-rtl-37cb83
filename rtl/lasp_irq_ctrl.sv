// lasp_irq_ctrl: interrupt and DMA control interface of the LASP24 DSP.
//
// A request flag and a seven-state machine.
//
// Request flag: a peripheral asks for service with a low-going pulse on
// irq_req_n.  The flag is set when the pulse ends (its rising edge) and
// stays set until the DSP acknowledges with INTA, so a short asynchronous
// request is never lost.  Here the flag is a synchronous flip-flop: the
// request is brought into the clock domain with two flip-flops and its
// rising edge sets the flag.
//
// State machine (the document's S0..S6):
//   S0 MONITOR  waits for an instruction boundary (instr_end) and then
//               checks DMA and interrupt requests; DMA goes first.
//   S1 DMA      grants the bus (dma_grant) while dma_req stays high, then S0.
//   S2 SAVE     asks to store PC and status in data memory (save_req);
//               stays until dmem_ready, then S3.
//   S3 ACCEPT   pulses INTA (inta_n low for one clock, which also clears the
//               request flag), then S4.
//   S4 VECTOR   reads the interrupt vector from main memory (vec_rd); stays
//               until mmem_ready, then loads the vector into the PC
//               (pc_load, pc_value = vec_data) and goes to S5.
//   S5 SERVICE  the subroutine runs; when the core reports its end
//               (isr_done) the saved return address is loaded back into
//               the PC (pc_load, pc_value = saved PC), then S6.
//   S6 RESUME   does nothing for one clock, then S0.
// No interrupt is accepted from S1 to S6 (no nesting), as in the document.
// The state list is the document's; the signal names, the DMA priority and
// the flag's synchronous form are this design's choices.
module lasp_irq_ctrl #(
  parameter int unsigned PCW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           irq_req_n,
  input  logic           dma_req,
  input  logic           instr_end,
  input  logic [PCW-1:0] pc,
  input  logic           dmem_ready,
  input  logic           mmem_ready,
  input  logic [PCW-1:0] vec_data,
  input  logic           isr_done,
  output logic           intr,        // request flag
  output logic           dma_grant,
  output logic           save_req,
  output logic [PCW-1:0] save_pc,
  output logic           inta_n,
  output logic           vec_rd,
  output logic           pc_load,
  output logic [PCW-1:0] pc_value,
  output logic [2:0]     state_o
);

  typedef enum logic [2:0] {
    S0_MONITOR = 3'd0,
    S1_DMA     = 3'd1,
    S2_SAVE    = 3'd2,
    S3_ACCEPT  = 3'd3,
    S4_VECTOR  = 3'd4,
    S5_SERVICE = 3'd5,
    S6_RESUME  = 3'd6
  } state_e;

  state_e         state;
  logic [2:0]     req_sync;
  logic [PCW-1:0] ret_pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync <= 3'b111;
      intr     <= 1'b0;
    end else begin
      req_sync <= {req_sync[1:0], irq_req_n};
      if (state == S3_ACCEPT)              intr <= 1'b0;
      else if (req_sync[1] && !req_sync[2]) intr <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S0_MONITOR;
      ret_pc <= '0;
    end else begin
      unique case (state)
        S0_MONITOR: if (instr_end) begin
          if (dma_req)   state <= S1_DMA;
          else if (intr) begin
            state  <= S2_SAVE;
            ret_pc <= pc;
          end
        end
        S1_DMA:     if (!dma_req)   state <= S0_MONITOR;
        S2_SAVE:    if (dmem_ready) state <= S3_ACCEPT;
        S3_ACCEPT:                  state <= S4_VECTOR;
        S4_VECTOR:  if (mmem_ready) state <= S5_SERVICE;
        S5_SERVICE: if (isr_done)   state <= S6_RESUME;
        S6_RESUME:                  state <= S0_MONITOR;
        default:                    state <= S0_MONITOR;
      endcase
    end
  end

  always_comb begin
    dma_grant = (state == S1_DMA);
    save_req  = (state == S2_SAVE);
    save_pc   = ret_pc;
    inta_n    = !(state == S3_ACCEPT);
    vec_rd    = (state == S4_VECTOR);
    pc_load   = 1'b0;
    pc_value  = vec_data;
    if (state == S4_VECTOR && mmem_ready) begin
      pc_load = 1'b1;
    end else if (state == S5_SERVICE && isr_done) begin
      pc_load  = 1'b1;
      pc_value = ret_pc;
    end
  end

  assign state_o = state;

endmodule
