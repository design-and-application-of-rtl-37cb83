// lasp_vector_agu: vector address generator of the LASP24 DSP.
//
// Decodes a 24-bit instruction in the vector addressing mode
//   VC <- VA[AR_A] OP VB[AR_B]
//   bits 23..19 opcode, 18..16 = 011 (vector mode), 15..14 unused,
//   13..12 FIL, 11..10 EXT, 9..8 RAM0, 7..6 RAM1 (address modes),
//   5..4 VC, 3..2 VA, 1..0 VB (bank selects)
// and forms one address per memory from the auxiliary registers:
//
//   code  FIL         EXT          RAM0      RAM1      VC    VA    VB
//   00    R_FIL       R_EXT        AR0       AR0       RAM0  RAM0  RAM0
//   01    R_FIL+AR0   R_EXT+AR0    AR1       AR1       RAM1  RAM1  RAM1
//   10    R_FIL+AR1   R_EXT+AR1    AR0+AR1   AR0+AR1   EXT   EXT   WIN
//   11    R_FIL-AR0   R_EXT-AR0    AR1-AR0   AR1-AR0   R3    --    FIL
//
// The window ROM is addressed by AR0 (the document writes it WIN[R]).  VA =
// 11 has no source and gives valid = 0, as does any instruction whose mode
// field is not 011.  AR0/AR1 (called R and J in the instruction listings)
// are AW = 10 bits wide, enough for the 512-element vectors the document
// mentions; the base registers R_EXT and R_FIL are EW = 14 bits wide.
// Sums wrap at the register width.  Combinational; each step of a vector
// loop presents new AR values (the loop itself is run by the program
// control with RPB/RETB).  The encoding tables are the document's.
module lasp_vector_agu
  import lasp_pkg::*;
#(
  parameter int unsigned AW = 10,
  parameter int unsigned EW = 14
) (
  input  logic [23:0]   instr,
  input  logic [AW-1:0] ar0,
  input  logic [AW-1:0] ar1,
  input  logic [EW-1:0] r_ext,
  input  logic [EW-1:0] r_fil,
  output logic [4:0]    opcode,
  output logic [EW-1:0] fil_addr,
  output logic [EW-1:0] ext_addr,
  output logic [AW-1:0] ram0_addr,
  output logic [AW-1:0] ram1_addr,
  output logic [AW-1:0] win_addr,
  output mem_sel_e      vc_sel,
  output mem_sel_e      va_sel,
  output mem_sel_e      vb_sel,
  output logic          valid
);

  function automatic logic [EW-1:0] base_mode(input logic [1:0] m, input logic [EW-1:0] base,
                                              input logic [AW-1:0] a0, input logic [AW-1:0] a1);
    unique case (m)
      2'b00: return base;
      2'b01: return base + EW'(a0);
      2'b10: return base + EW'(a1);
      default: return base - EW'(a0);
    endcase
  endfunction

  function automatic logic [AW-1:0] ram_mode(input logic [1:0] m,
                                             input logic [AW-1:0] a0, input logic [AW-1:0] a1);
    unique case (m)
      2'b00: return a0;
      2'b01: return a1;
      2'b10: return a0 + a1;
      default: return a1 - a0;
    endcase
  endfunction

  assign opcode    = instr[23:19];
  assign fil_addr  = base_mode(instr[13:12], r_fil, ar0, ar1);
  assign ext_addr  = base_mode(instr[11:10], r_ext, ar0, ar1);
  assign ram0_addr = ram_mode(instr[9:8], ar0, ar1);
  assign ram1_addr = ram_mode(instr[7:6], ar0, ar1);
  assign win_addr  = ar0;

  always_comb begin
    unique case (instr[5:4])
      2'b00: vc_sel = MEM_RAM0;
      2'b01: vc_sel = MEM_RAM1;
      2'b10: vc_sel = MEM_EXT;
      default: vc_sel = MEM_R3;
    endcase
    unique case (instr[3:2])
      2'b00: va_sel = MEM_RAM0;
      2'b01: va_sel = MEM_RAM1;
      2'b10: va_sel = MEM_EXT;
      default: va_sel = MEM_NONE;
    endcase
    unique case (instr[1:0])
      2'b00: vb_sel = MEM_RAM0;
      2'b01: vb_sel = MEM_RAM1;
      2'b10: vb_sel = MEM_WIN;
      default: vb_sel = MEM_FIL;
    endcase
    valid = (instr[18:16] == MODE_VECTOR) && (va_sel != MEM_NONE);
  end

endmodule
