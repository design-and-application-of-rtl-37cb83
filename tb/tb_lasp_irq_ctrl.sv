// tb_lasp_irq_ctrl: walks the LASP24 interrupt/DMA controller through a DMA
// request and a full interrupt (request pulse, save with memory wait states,
// acknowledge, vector fetch with wait states, service, return), checks each
// state, the strobes, the PC values and that no second interrupt is taken
// while one is being served.  It then runs 30 random sequences (random
// request timing, DMA lengths and memory wait states) against a model of the
// state machine.
module tb_lasp_irq_ctrl;
  logic clk = 0, rst_n = 0;
  logic irq_req_n = 1, dma_req = 0, instr_end = 0, dmem_ready = 0, mmem_ready = 0, isr_done = 0;
  logic [15:0] pc = 16'h0123, vec_data = 16'h0800;
  logic intr, dma_grant, save_req, inta_n, vec_rd, pc_load;
  logic [15:0] save_pc, pc_value;
  logic [2:0] state_o;
  int checks = 0, failures = 0;
  int cyc = 0;

  lasp_irq_ctrl dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d (state %0d)", what, cyc, state_o); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state_o == 0 && !intr && inta_n, "reset");
    // DMA
    dma_req = 1; instr_end = 1;
    @(negedge clk);
    check(state_o == 1 && dma_grant, "dma grant");
    repeat (3) @(negedge clk);
    check(state_o == 1 && dma_grant, "dma held");
    dma_req = 0;
    @(negedge clk);
    check(state_o == 0 && !dma_grant, "dma end");
    // interrupt request pulse, no instruction boundary yet
    instr_end = 0;
    irq_req_n = 0; repeat (2) @(negedge clk); irq_req_n = 1;
    repeat (4) @(negedge clk);
    check(intr, "flag set after pulse");
    check(state_o == 0, "waits for instruction end");
    instr_end = 1;
    @(negedge clk);
    instr_end = 0;
    check(state_o == 2 && save_req && save_pc == 16'h0123, "save");
    repeat (2) @(negedge clk);
    check(state_o == 2, "save waits for memory");
    check(intr, "flag held until the acknowledge");
    dmem_ready = 1; @(negedge clk); dmem_ready = 0;
    check(state_o == 3 && !inta_n, "acknowledge");
    @(negedge clk);
    check(state_o == 4 && vec_rd && inta_n && !intr, "vector read, flag cleared");
    // a second request while the first is served must wait
    irq_req_n = 0; @(negedge clk); irq_req_n = 1;
    check(!pc_load, "no load before memory ready");
    mmem_ready = 1; #1;
    check(pc_load && pc_value == 16'h0800, "vector into PC");
    @(negedge clk); mmem_ready = 0;
    check(state_o == 5, "service");
    instr_end = 1;
    repeat (3) @(negedge clk);
    check(state_o == 5, "no nesting");
    isr_done = 1; #1;
    check(pc_load && pc_value == 16'h0123, "return address restored");
    @(negedge clk); isr_done = 0; instr_end = 0;
    check(state_o == 6, "resume");
    @(negedge clk);
    check(state_o == 0, "back to monitor");
    check(intr, "second request pending");
    instr_end = 1; pc = 16'h0456;
    @(negedge clk);
    check(state_o == 2 && save_pc == 16'h0456, "second interrupt taken");
    instr_end = 0;
    dmem_ready = 1; @(negedge clk); dmem_ready = 0;
    @(negedge clk); mmem_ready = 1; @(negedge clk); mmem_ready = 0;
    isr_done = 1; @(negedge clk); isr_done = 0;
    @(negedge clk);
    check(state_o == 0 && !intr, "idle after second service");
    // random sequences: DMA bursts and interrupts with random memory delays
    for (int n = 0; n < 30; n++) begin
      int services;
      logic [15:0] p;
      services = 0;
      if ($urandom % 2) begin
        dma_req = 1; instr_end = 1;
        @(negedge clk); instr_end = 0;
        check(dma_grant, "random: DMA granted at instruction end");
        repeat ($urandom % 5) @(negedge clk);
        dma_req = 0; @(negedge clk);
        check(state_o == 0, "random: DMA released");
      end
      irq_req_n = 0; repeat (1 + $urandom % 3) @(negedge clk); irq_req_n = 1;
      repeat (4 + $urandom % 4) @(negedge clk);
      check(intr, "random: flag set");
      p = 16'($urandom); pc = p; vec_data = 16'($urandom);
      instr_end = 1; @(negedge clk); instr_end = 0;
      check(state_o == 2 && save_pc == p, "random: PC saved");
      repeat ($urandom % 4) begin
        check(state_o == 2 && intr, "random: waits in save with flag set");
        @(negedge clk);
      end
      dmem_ready = 1; @(negedge clk); dmem_ready = 0;
      check(!inta_n, "random: INTA");
      @(negedge clk);
      check(!intr, "random: flag cleared by INTA");
      repeat ($urandom % 4) @(negedge clk);
      mmem_ready = 1; #1;
      check(pc_load && pc_value == vec_data, "random: vector loaded");
      @(negedge clk); mmem_ready = 0;
      repeat ($urandom % 4) @(negedge clk);
      isr_done = 1; #1;
      check(pc_load && pc_value == p, "random: return PC");
      @(negedge clk); isr_done = 0;
      @(negedge clk);
      check(state_o == 0 && !intr, "random: back to monitor, nothing pending");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
