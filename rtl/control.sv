// Main controller of the single-cycle processor.
//
// Purely combinational, built as the two planes of a PLA.  The "AND" plane
// matches the opcode (and, for R-type, the function code) against the seven
// supported instructions and raises one of add, sub, ori, lw, sw, beq, jump.
// The "OR" plane then forms each control point as the OR of the instructions
// that need it:
//   RegDst   = add + sub            ALUSrc   = ori + lw + sw
//   MemtoReg = lw                   RegWrite = add + sub + ori + lw
//   MemWrite = sw                   nPCsel   = beq
//   Jump     = jump                 ExtOp    = lw + sw
//   ALUctr[0] = sub + beq           ALUctr[1] = ori
// with ALUctr 00 = ADD, 01 = SUB, 10 = OR.  Control points that the
// instruction table leaves as don't-care come out as 0 here.  An opcode or
// function code outside the subset raises no instruction line, so nothing is
// written and PC advances by 4 (design choice: unknown instructions act as
// no-ops).  Immediate assertions check that at most one instruction line is
// active and that no instruction both writes a register and memory or both
// branches and jumps.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);
  // AND plane: one line per instruction
  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  always_comb begin
    rtype  = (op == OP_RTYPE);
    i_add  = rtype && (funct == FUNCT_ADD);
    i_sub  = rtype && (funct == FUNCT_SUB);
    i_ori  = (op == OP_ORI);
    i_lw   = (op == OP_LW);
    i_sw   = (op == OP_SW);
    i_beq  = (op == OP_BEQ);
    i_jump = (op == OP_J);
  end

  // At most one instruction line is ever active.
  always_comb begin
    assert ($onehot0({i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump}))
      else $error("control: several instruction lines active");
  end

  // OR plane: one output per control point
  always_comb begin
    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_wr     = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_wr     = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = i_lw | i_sw;
    ctrl.alu_ctr    = alu_ctr_e'({i_ori, i_sub | i_beq});
  end

  // No instruction writes both the register file and memory, and no
  // instruction is both a branch and a jump.
  always_comb begin
    assert (!(ctrl.reg_wr && ctrl.mem_wr))
      else $error("control: RegWrite and MemWrite both active");
    assert (!(ctrl.npc_sel && ctrl.jump))
      else $error("control: nPCsel and Jump both active");
  end
endmodule
