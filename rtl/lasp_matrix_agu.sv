// lasp_matrix_agu: matrix address generator of the LASP24 DSP.
//
// LASP24 stores a matrix of up to 16 x 16 elements in internal bank RAM0 and
// addresses element (X, Y) at RAM0 address {X, Y} (X in the high nibble, Y
// in the low nibble of the 8-bit address).  A 4-bit code in the instruction
// chooses how X and Y, or the whole address, come from the two 8-bit
// auxiliary registers AR0 and AR1; AR0L and AR1L are their low nibbles.
// Nibble arithmetic wraps modulo 16, byte arithmetic modulo 256.
//
//   code  address                 code  address
//   0000  AR0                     1000  [AR0L-AR1L, AR0L]
//   0001  AR1                     1001  [AR1L+1,   AR0L+1]
//   0010  AR0+AR1                 1010  reserved
//   0011  [1111, AR0L]            1011  reserved
//   0100  [AR1L+1, AR0L]          1100  [0000, AR0L]
//   0101  [1110, AR0L-AR1L]       1101  [1110, AR0L]
//   0110  [1110, AR0L+1]          1110  reserved
//   0111  [AR0L+1, AR0L+1]        1111  [0001, AR0L]
//
// The table is the document's; the {X, Y} packing of the address is this
// design's reading of it.  A reserved code gives valid = 0 and address 0.
// The block is combinational: the address is ready in the decode (R) stage
// of the pipeline in which the instruction is decoded.
module lasp_matrix_agu (
  input  logic [3:0] code,
  input  logic [7:0] ar0,
  input  logic [7:0] ar1,
  output logic [7:0] addr,
  output logic       valid
);

  logic [3:0] a0, a1;
  assign a0 = ar0[3:0];
  assign a1 = ar1[3:0];

  always_comb begin
    valid = 1'b1;
    unique case (code)
      4'b0000: addr = ar0;
      4'b0001: addr = ar1;
      4'b0010: addr = ar0 + ar1;
      4'b0011: addr = {4'b1111, a0};
      4'b0100: addr = {a1 + 4'd1, a0};
      4'b0101: addr = {4'b1110, a0 - a1};
      4'b0110: addr = {4'b1110, a0 + 4'd1};
      4'b0111: addr = {a0 + 4'd1, a0 + 4'd1};
      4'b1000: addr = {a0 - a1, a0};
      4'b1001: addr = {a1 + 4'd1, a0 + 4'd1};
      4'b1100: addr = {4'b0000, a0};
      4'b1101: addr = {4'b1110, a0};
      4'b1111: addr = {4'b0001, a0};
      default: begin
        addr  = 8'h00;
        valid = 1'b0;
      end
    endcase
  end

endmodule
