// Single-cycle datapath.
//
// Everything of the processor except the controller.  In one clock cycle:
//   1. the instruction fetch unit reads Instruction<31:0> at PC;
//   2. the register file reads busA = R[rs] (bits 25:21) and busB = R[rt]
//      (bits 20:16);
//   3. the extender widens imm16 (bits 15:0), zero- or sign-filled by ExtOp;
//   4. the ALU combines busA with busB or the immediate (ALUSrc) as ALUctr
//      says, and raises Equal when the result is zero;
//   5. the data memory is addressed by the ALU result, with busB as Data In
//      and MemWr as write enable;
//   6. busW is the ALU result or the memory output (MemtoReg) and is written to
//      register rd (bits 15:11) or rt (RegDst) when RegWr is 1;
//   7. the fetch unit picks the next PC from nPC_sel, Equal and Jump.
// Register file, data memory and PC all update at the same rising clock edge
// that ends the cycle.  The control points arrive as one ctrl_t bundle; the
// instruction goes out to the controller.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ctrl_t       ctrl,
  output logic [31:0] instr,
  output logic [31:0] pc,
  // instruction memory load port
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata
);
  logic [4:0]  rw;
  logic [31:0] busa, busb, busw;
  logic [31:0] imm32, alu_b, alu_out, mem_out;
  logic        equal;

  ifu #(.IMEM_DEPTH(IMEM_DEPTH)) u_ifu (
    .clk        (clk),
    .rst_n      (rst_n),
    .npc_sel    (ctrl.npc_sel),
    .equal      (equal),
    .jump       (ctrl.jump),
    .instr      (instr),
    .pc         (pc),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );

  mux2 #(.WIDTH(5)) u_regdst_mux (
    .in0 (f_rt(instr)),
    .in1 (f_rd(instr)),
    .sel (ctrl.reg_dst),
    .out (rw)
  );

  regfile u_rf (
    .clk    (clk),
    .rst_n  (rst_n),
    .reg_wr (ctrl.reg_wr),
    .rw     (rw),
    .busw   (busw),
    .ra     (f_rs(instr)),
    .rb     (f_rt(instr)),
    .busa   (busa),
    .busb   (busb)
  );

  extender u_ext (
    .imm16  (f_imm16(instr)),
    .ext_op (ctrl.ext_op),
    .imm32  (imm32)
  );

  mux2 #(.WIDTH(32)) u_alusrc_mux (
    .in0 (busb),
    .in1 (imm32),
    .sel (ctrl.alu_src),
    .out (alu_b)
  );

  alu u_alu (
    .a       (busa),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .equal   (equal)
  );

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk      (clk),
    .wr_en    (ctrl.mem_wr),
    .adr      (alu_out),
    .data_in  (busb),
    .data_out (mem_out)
  );

  mux2 #(.WIDTH(32)) u_memtoreg_mux (
    .in0 (alu_out),
    .in1 (mem_out),
    .sel (ctrl.mem_to_reg),
    .out (busw)
  );
endmodule
