// Testbench helpers for the single-cycle processor: instruction encoders and
// an instruction-level reference model.
//
// Builds 32-bit instruction words from their fields, using the formats
//   R-type: op(31:26) rs(25:21) rt(20:16) rd(15:11) shamt(10:6) funct(5:0)
//   I-type: op(31:26) rs(25:21) rt(20:16) imm16(15:0)
//   J-type: op(31:26) target(25:0)
// The codes are written out here independently of the design's package.
package mips_tb_pkg;
  localparam logic [5:0] T_OP_R   = 6'b000000;
  localparam logic [5:0] T_OP_ORI = 6'b001101;
  localparam logic [5:0] T_OP_LW  = 6'b100011;
  localparam logic [5:0] T_OP_SW  = 6'b101011;
  localparam logic [5:0] T_OP_BEQ = 6'b000100;
  localparam logic [5:0] T_OP_J   = 6'b000010;
  localparam logic [5:0] T_FN_ADD = 6'b100000;
  localparam logic [5:0] T_FN_SUB = 6'b100110;

  function automatic logic [31:0] enc_add(int rd, int rs, int rt);
    return {T_OP_R, rs[4:0], rt[4:0], rd[4:0], 5'd0, T_FN_ADD};
  endfunction
  function automatic logic [31:0] enc_sub(int rd, int rs, int rt);
    return {T_OP_R, rs[4:0], rt[4:0], rd[4:0], 5'd0, T_FN_SUB};
  endfunction
  function automatic logic [31:0] enc_ori(int rt, int rs, logic [15:0] imm);
    return {T_OP_ORI, rs[4:0], rt[4:0], imm};
  endfunction
  function automatic logic [31:0] enc_lw(int rt, int rs, logic [15:0] imm);
    return {T_OP_LW, rs[4:0], rt[4:0], imm};
  endfunction
  function automatic logic [31:0] enc_sw(int rt, int rs, logic [15:0] imm);
    return {T_OP_SW, rs[4:0], rt[4:0], imm};
  endfunction
  function automatic logic [31:0] enc_beq(int rs, int rt, logic [15:0] off);
    return {T_OP_BEQ, rs[4:0], rt[4:0], off};
  endfunction
  function automatic logic [31:0] enc_j(logic [25:0] target);
    return {T_OP_J, target};
  endfunction

  // Instruction-level reference model of the processor, for testbenches.
  //
  // Holds its own PC, 32 registers (register 0 fixed at zero), instruction
  // memory and data memory, both word arrays indexed by address bits 2 and up,
  // wrapping at their depth.  step() executes one instruction with the register
  // transfers of the instruction set:
  //   add  R[rd] = R[rs] + R[rt]          sub  R[rd] = R[rs] - R[rt]
  //   ori  R[rt] = R[rs] | ZeroExt(imm)   lw   R[rt] = M[R[rs] + SignExt(imm)]
  //   sw   M[R[rs] + SignExt(imm)] = R[rt]
  //   beq  if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm) * 4
  //   j    PC = {PC[31:28], target, 00}
  // and PC = PC + 4 otherwise; unknown instructions change nothing but the PC.
  // It counts how often each instruction (and each beq outcome) ran.
  class mips_ref_model #(int IDEPTH = 1024, int DDEPTH = 1024);
    logic [31:0] pc;
    logic [31:0] regs [32];
    logic [31:0] imem [IDEPTH];
    logic [31:0] dmem [DDEPTH];
    int n_add, n_sub, n_ori, n_lw, n_sw, n_beq_taken, n_beq_not, n_j, n_unknown;
    int n_r0_write;
    // last memory write, for comparison with the design
    bit          last_wr;
    logic [31:0] last_wr_addr, last_wr_data;

    function new();
      pc = 0;
      foreach (regs[i]) regs[i] = 0;
      n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0;
      n_beq_taken = 0; n_beq_not = 0; n_j = 0; n_unknown = 0; n_r0_write = 0;
    endfunction

    function int unsigned iidx(logic [31:0] a);
      return int'(a >> 2) % IDEPTH;
    endfunction
    function int unsigned didx(logic [31:0] a);
      return int'(a >> 2) % DDEPTH;
    endfunction

    function void wreg(logic [4:0] r, logic [31:0] v);
      if (r != 0) regs[r] = v;
      else n_r0_write++;
    endfunction

    function void step();
      logic [31:0] w, a, b, se, ze, ea, npc;
      logic [5:0]  op, fn;
      logic [4:0]  rs, rt, rd;
      w  = imem[iidx(pc)];
      op = w[31:26]; rs = w[25:21]; rt = w[20:16]; rd = w[15:11]; fn = w[5:0];
      a  = regs[rs]; b = regs[rt];
      se = {{16{w[15]}}, w[15:0]};
      ze = {16'h0, w[15:0]};
      ea = a + se;
      npc = pc + 4;
      last_wr = 0;
      case (op)
        6'b000000:
          if (fn == 6'b100000) begin wreg(rd, a + b); n_add++; end
          else if (fn == 6'b100110) begin wreg(rd, a - b); n_sub++; end
          else n_unknown++;
        6'b001101: begin wreg(rt, a | ze); n_ori++; end
        6'b100011: begin wreg(rt, dmem[didx(ea)]); n_lw++; end
        6'b101011: begin
          dmem[didx(ea)] = b; n_sw++;
          last_wr = 1; last_wr_addr = ea; last_wr_data = b;
        end
        6'b000100:
          if (a == b) begin npc = pc + 4 + (se << 2); n_beq_taken++; end
          else n_beq_not++;
        6'b000010: begin npc = {pc[31:28], w[25:0], 2'b00}; n_j++; end
        default: n_unknown++;
      endcase
      pc = npc;
    endfunction
  endclass
endpackage
