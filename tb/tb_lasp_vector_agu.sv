// tb_lasp_vector_agu: drives random vector-mode instructions and auxiliary
// registers into the LASP24 vector address generator and compares every
// address and bank select with a reference computed from the encoding table.
module tb_lasp_vector_agu;
  import lasp_pkg::*;
  logic [23:0] instr;
  logic [9:0]  ar0, ar1, ram0_addr, ram1_addr, win_addr;
  logic [13:0] r_ext, r_fil, fil_addr, ext_addr;
  logic [4:0]  opcode;
  mem_sel_e    vc_sel, va_sel, vb_sel;
  logic        valid;
  int checks = 0, failures = 0;

  lasp_vector_agu dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("mismatch %s instr %h", what, instr);
    end
  endtask

  function automatic int base_ref(int m, int b, int a0, int a1);
    case (m)
      0: return b;
      1: return (b + a0) % 16384;
      2: return (b + a1) % 16384;
      default: return (b - a0 + 16384) % 16384;
    endcase
  endfunction

  function automatic int ram_ref(int m, int a0, int a1);
    case (m)
      0: return a0;
      1: return a1;
      2: return (a0 + a1) % 1024;
      default: return (a1 - a0 + 1024) % 1024;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_sel_e vc_t[4] = '{MEM_RAM0, MEM_RAM1, MEM_EXT, MEM_R3};
    mem_sel_e va_t[4] = '{MEM_RAM0, MEM_RAM1, MEM_EXT, MEM_NONE};
    mem_sel_e vb_t[4] = '{MEM_RAM0, MEM_RAM1, MEM_WIN, MEM_FIL};
    for (int it = 0; it < 2000; it++) begin
      instr = 24'($urandom);
      if (it % 4 != 0) instr[18:16] = 3'b011;
      ar0 = 10'($urandom); ar1 = 10'($urandom);
      r_ext = 14'($urandom); r_fil = 14'($urandom);
      if (it < 4) begin ar0 = 10'h3FF; ar1 = 10'h001; r_ext = 14'h0; r_fil = 14'h3FFF; end
      #1;
      check(opcode == instr[23:19], "opcode");
      check(int'(fil_addr)  == base_ref(instr[13:12], r_fil, ar0, ar1), "fil");
      check(int'(ext_addr)  == base_ref(instr[11:10], r_ext, ar0, ar1), "ext");
      check(int'(ram0_addr) == ram_ref(instr[9:8], ar0, ar1), "ram0");
      check(int'(ram1_addr) == ram_ref(instr[7:6], ar0, ar1), "ram1");
      check(win_addr == ar0, "win");
      check(vc_sel == vc_t[instr[5:4]], "vc");
      check(va_sel == va_t[instr[3:2]], "va");
      check(vb_sel == vb_t[instr[1:0]], "vb");
      check(valid == (instr[18:16] == 3'b011 && instr[3:2] != 2'b11), "valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
