// 32-bit ALU of the single-cycle processor.
//
// Computes A + B, A - B or A | B as selected by ALUctr (00 ADD, 01 SUB,
// 10 OR; the unused code 11 gives zero).  The Equal output is 1 when the
// result is zero; beq runs the ALU as a subtracter, so Equal then means
// busA == busB.  Overflow is not detected: the instruction subset has no
// trapping arithmetic, so add/sub wrap modulo 2^32 (design choice).
// Purely combinational.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctr_e    alu_ctr,
  output logic [31:0] result,
  output logic        equal
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    equal = (result == '0);
  end
endmodule
