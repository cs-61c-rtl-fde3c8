// Single-cycle processor for a MIPS subset: add, sub, ori, lw, sw, beq, j.
//
// The controller decodes Instruction<31:26> (op) and <5:0> (func) into the
// datapath's control points; the datapath executes the whole instruction in
// one clock cycle and all state (PC, registers, data memory) updates at the
// rising clock edge that ends it.  CPI is 1: one instruction retires per
// clock after reset is released.
//
// Interface: clk, active-low asynchronous reset rst_n (PC goes to 0 and the
// registers clear); a program is written into instruction memory through
// prog_we / prog_addr / prog_wdata (byte address, one word per rising edge)
// while rst_n is low.  pc and instr show the instruction executing in the
// current cycle.  Memory depths are parameters of this design's choosing.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata,
  output logic [31:0] pc,
  output logic [31:0] instr
);
  ctrl_t ctrl;

  control u_ctrl (
    .op    (f_op(instr)),
    .funct (f_funct(instr)),
    .ctrl  (ctrl)
  );

  datapath #(
    .IMEM_DEPTH (IMEM_DEPTH),
    .DMEM_DEPTH (DMEM_DEPTH)
  ) u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .ctrl       (ctrl),
    .instr      (instr),
    .pc         (pc),
    .prog_we    (prog_we),
    .prog_addr  (prog_addr),
    .prog_wdata (prog_wdata)
  );
endmodule
