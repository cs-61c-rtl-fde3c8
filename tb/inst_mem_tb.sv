// Self-checking testbench for inst_mem: loads every word through the load
// port, then reads random addresses combinationally and compares them with
// the loaded values; also checks that prog_we = 0 leaves the contents alone.
module inst_mem_tb;
  localparam int DEPTH = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [31:0] addr, instr, paddr, pdata;
  logic [31:0] ref_mem [DEPTH];

  inst_mem dut (.clk(clk), .addr(addr), .instr(instr),
                .prog_we(we), .prog_addr(paddr), .prog_wdata(pdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; paddr = 0; pdata = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; paddr = 32'(i * 4); pdata = $urandom; ref_mem[i] = pdata;
    end
    @(negedge clk); we = 0; paddr = 0; pdata = ~ref_mem[0];
    repeat (2) @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      addr = {20'($urandom), 10'($urandom), 2'b00};
      #1;
      checks++;
      if (instr !== ref_mem[addr[11:2]]) begin
        failures++; $display("FAIL addr=%h instr=%h exp=%h", addr, instr, ref_mem[addr[11:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
