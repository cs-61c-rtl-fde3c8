// Shared constants and types for the single-cycle MIPS-subset processor.
//
// The processor executes seven instructions: add, sub, ori, lw, sw, beq and j.
// This package holds the instruction-field positions, the opcode and function
// codes, the 2-bit ALU operation encoding (00 ADD, 01 SUB, 10 OR) and the
// bundle of control points that the controller drives into the datapath.
//
// The opcodes of add/sub (000000), ori (001101), sw (101011), beq (000100)
// and j (000010), the add function code (100000) and the ALU encoding are the
// values the design is specified with.  The lw opcode (100011) is the standard
// MIPS value.  The sub function code is kept as specified (100110); note that
// standard MIPS uses 100010 for sub, so change FUNCT_SUB to run stock MIPS
// binaries.
package mips_pkg;

  // Opcodes, instruction bits 31:26
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_J     = 6'b000010;

  // Function codes of R-type instructions, instruction bits 5:0
  localparam logic [5:0] FUNCT_ADD = 6'b100000;
  localparam logic [5:0] FUNCT_SUB = 6'b100110;

  // ALU operation select (ALUctr)
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Control points of the datapath
  typedef struct packed {
    logic     reg_dst;    // 0: write Rt, 1: write Rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data memory output
    logic     reg_wr;     // 1: write the register file
    logic     mem_wr;     // 1: write the data memory
    logic     npc_sel;    // 1: branch instruction (taken when Equal)
    logic     jump;       // 1: jump instruction
    logic     ext_op;     // 0: zero-extend, 1: sign-extend imm16
    alu_ctr_e alu_ctr;    // ALU operation
  } ctrl_t;

  // Instruction field extraction
  function automatic logic [5:0] f_op(input logic [31:0] i);
    return i[31:26];
  endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);
    return i[25:21];
  endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);
    return i[20:16];
  endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);
    return i[15:11];
  endfunction
  function automatic logic [5:0] f_funct(input logic [31:0] i);
    return i[5:0];
  endfunction
  function automatic logic [15:0] f_imm16(input logic [31:0] i);
    return i[15:0];
  endfunction
  function automatic logic [25:0] f_target(input logic [31:0] i);
    return i[25:0];
  endfunction

endpackage
