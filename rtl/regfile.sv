// Register file: 32 registers of 32 bits, two read ports and one write port.
//
// busA = R[Ra] and busB = R[Rb] are read combinationally, so they follow the
// register numbers within the same cycle.  When RegWr is 1, busW is written
// into R[Rw] at the rising clock edge that ends the cycle.  Register 0 always
// reads as zero and ignores writes, and reset clears all registers: both are
// design choices (the MIPS convention for $0).
module regfile #(
  parameter int unsigned NUM_REGS = 32,
  parameter int unsigned WIDTH    = 32,
  localparam int unsigned AW      = $clog2(NUM_REGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reg_wr,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] busw,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  output logic [WIDTH-1:0] busa,
  output logic [WIDTH-1:0] busb
);
  logic [WIDTH-1:0] regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (reg_wr && rw != '0) begin
      regs[rw] <= busw;
    end
  end

  always_comb begin
    busa = (ra == '0) ? '0 : regs[ra];
    busb = (rb == '0) ? '0 : regs[rb];
  end
endmodule
