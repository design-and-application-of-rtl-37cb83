// lasp_pkg: shared types of the LASP24 DSP address generators.
//
// LASP24 has three data memories seen by the vector unit -- the internal
// banks RAM0 and RAM1 and the external RAM (EXT) -- and two read-only
// tables, the filter ROM (FIL) and the window ROM (WIN), plus register R3
// as a possible vector destination.
package lasp_pkg;

  typedef enum logic [2:0] {
    MEM_RAM0 = 3'd0,
    MEM_RAM1 = 3'd1,
    MEM_EXT  = 3'd2,
    MEM_WIN  = 3'd3,
    MEM_FIL  = 3'd4,
    MEM_R3   = 3'd5,
    MEM_NONE = 3'd7
  } mem_sel_e;

  // Mode field (bits 18..16) of a LASP24 instruction that selects the
  // vector addressing mode.
  localparam logic [2:0] MODE_VECTOR = 3'b011;

endpackage
