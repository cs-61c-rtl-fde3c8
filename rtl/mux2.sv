// Two-input multiplexer.
//
// out = sel ? in1 : in0.  The single-cycle datapath uses three of these: the
// RegDst mux (Rt or Rd as write register, 5 bits), the ALUSrc mux (busB or the
// extended immediate as the ALU's second operand, 32 bits) and the MemtoReg
// mux (ALU result or data memory output onto busW, 32 bits).  Input 0 / input 1
// numbering follows the datapath drawings.  Purely combinational.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  input  logic             sel,
  output logic [WIDTH-1:0] out
);
  always_comb begin
    if (sel) out = in1;
    else     out = in0;
  end
endmodule
