// Data memory.
//
// Holds DEPTH 32-bit words.  Data Out = MEM[Adr] is read combinationally, so a
// load completes within its cycle; when WrEn is 1, Data In is written to
// MEM[Adr] at the rising clock edge that ends the cycle.  Adr is a byte
// address whose low two bits are ignored (word accesses only); addresses
// beyond DEPTH words wrap.  The depth is a design choice; contents are not
// reset.
module data_mem #(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  assign data_out = mem[adr[AW+1:2]];
endmodule
