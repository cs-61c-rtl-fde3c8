// Instruction memory.
//
// Holds DEPTH 32-bit words.  The read is combinational: instr = MEM[addr]
// with addr a byte address whose low two bits are ignored (instructions are
// word aligned), so the instruction of the current PC is available within the
// cycle, as the single-cycle datapath requires.  The processor never writes
// it; a separate load port (prog_we, prog_addr, prog_wdata, written at the
// rising clock edge) lets a host place a program in it while the processor is
// held in reset.  Addresses beyond DEPTH words wrap.  The depth and the load
// port are design choices; contents are not reset.
module inst_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic [31:0] addr,
  output logic [31:0] instr,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW+1:2]] <= prog_wdata;
  end

  assign instr = mem[addr[AW+1:2]];
endmodule
