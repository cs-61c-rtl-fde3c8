// Self-checking testbench for control.  Each of the seven instructions is
// checked against the control-signal table (don't-care entries skipped), and
// random opcode / function pairs outside the subset must write nothing and not
// redirect the PC.
module control_tb;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] op, funct;
  ctrl_t      c;

  control dut (.op(op), .funct(funct), .ctrl(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values: 0/1, or 2 for don't care.  Order:
  // RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr(0..2, 3=x)
  task automatic check(string name, logic [5:0] o, logic [5:0] f,
                       int rd, int as, int m2r, int rwr, int mwr, int npc,
                       int jmp, int ext, int actr);
    op = o; funct = f;
    #1;
    checks++;
    if ((rd  != 2 && c.reg_dst    != 1'(rd))  ||
        (as  != 2 && c.alu_src    != 1'(as))  ||
        (m2r != 2 && c.mem_to_reg != 1'(m2r)) ||
        (c.reg_wr  != 1'(rwr)) || (c.mem_wr != 1'(mwr)) ||
        (npc != 2 && c.npc_sel    != 1'(npc)) ||
        (c.jump    != 1'(jmp)) ||
        (ext != 2 && c.ext_op     != 1'(ext)) ||
        (actr != 3 && c.alu_ctr   != 2'(actr))) begin
      failures++;
      $display("FAIL %s: ctrl=%b", name, c);
    end
  endtask

  initial begin
    //                                      RD AS M2R RW MW NPC J EXT ALU
    check("add", 6'b000000, 6'b100000,      1, 0, 0,  1, 0, 0,  0, 2, 0);
    check("sub", 6'b000000, 6'b100110,      1, 0, 0,  1, 0, 0,  0, 2, 1);
    check("ori", 6'b001101, 6'($urandom),   0, 1, 0,  1, 0, 0,  0, 0, 2);
    check("lw",  6'b100011, 6'($urandom),   0, 1, 1,  1, 0, 0,  0, 1, 0);
    check("sw",  6'b101011, 6'($urandom),   2, 1, 2,  0, 1, 0,  0, 1, 0);
    check("beq", 6'b000100, 6'($urandom),   2, 0, 2,  0, 0, 1,  0, 2, 1);
    check("j",   6'b000010, 6'($urandom),   2, 2, 2,  0, 0, 2,  1, 2, 3);
    for (int i = 0; i < 500; i++) begin
      logic [5:0] o, f;
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      if (o == 6'b000000 && f inside {6'b100000, 6'b100110}) continue;
      check("unknown", o, f, 2, 2, 2, 0, 0, 0, 0, 2, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
