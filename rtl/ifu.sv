// Instruction fetch unit.
//
// Holds the program counter and the instruction memory.  Every cycle the
// instruction at PC is read out, and at the rising clock edge PC is loaded
// with the next address:
//   jump                 : {PC[31:28], target26, 00}
//   nPC_sel and Equal    : PC + 4 + SignExt(imm16) * 4   (taken beq)
//   otherwise            : PC + 4
// Two adders form PC + 4 and the branch target; "PC Ext" sign-extends imm16
// and shifts it left by two.  The branch mux is selected by nPC_sel AND Equal,
// and the jump mux sits after it.  Since instructions are word aligned the PC
// register stores only bits 31:2 and bits 1:0 read as 00.  Reset puts PC at
// RESET_PC (0 by default, a design choice).  The jump keeps the upper four
// bits of the current PC, as the design specifies (stock MIPS takes them from
// PC + 4; the two differ only at a 256 MB boundary).
module ifu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,   // branch instruction
  input  logic        equal,     // ALU Equal output
  input  logic        jump,      // jump instruction
  output logic [31:0] instr,
  output logic [31:0] pc,
  // instruction memory load port
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata
);
  logic [29:0] pc_q;          // PC[31:2]
  logic [31:0] pc_plus4;
  logic [31:0] pc_ext;        // SignExt(imm16) * 4
  logic [31:0] br_target;
  logic        br_mux_sel;
  logic [31:0] npc;

  assign pc = {pc_q, 2'b00};

  inst_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk        (clk),
    .addr       (pc),
    .instr      (instr),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  always_comb begin
    pc_plus4   = pc + 32'd4;
    pc_ext     = {{14{instr[15]}}, f_imm16(instr), 2'b00};
    br_target  = pc_plus4 + pc_ext;
    br_mux_sel = npc_sel & equal;
    if (jump)            npc = {pc[31:28], f_target(instr), 2'b00};
    else if (br_mux_sel) npc = br_target;
    else                 npc = pc_plus4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= RESET_PC[31:2];
    else        pc_q <= npc[31:2];
  end
endmodule
