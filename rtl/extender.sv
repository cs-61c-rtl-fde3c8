// Immediate extender.
//
// Widens the 16-bit immediate of an I-type instruction to 32 bits.  With
// ExtOp = 0 the upper half is filled with zeros (ori); with ExtOp = 1 it is
// filled with copies of bit 15 (lw, sw).  Purely combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,  // 0: zero-extend, 1: sign-extend
  output logic [31:0] imm32
);
  always_comb begin
    imm32 = {{16{ext_op & imm16[15]}}, imm16};
  end
endmodule
