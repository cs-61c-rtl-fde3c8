// Self-checking testbench for data_mem: fills the memory, then random reads
// and writes against a reference array, checking that WrEn = 0 writes nothing
// and that the low two address bits are ignored.
module data_mem_tb;
  localparam int DEPTH = 1024;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [31:0] adr, din, dout;
  logic [31:0] ref_mem [DEPTH];

  data_mem dut (.clk(clk), .wr_en(we), .adr(adr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adr = 0; din = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; adr = 32'(i * 4); din = $urandom; ref_mem[i] = din;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom % 2 == 1;
      adr = {20'($urandom), 10'($urandom), 2'($urandom)};
      din = $urandom;
      #1;
      checks++;
      if (dout !== ref_mem[adr[11:2]]) begin
        failures++; $display("FAIL read adr=%h dout=%h exp=%h", adr, dout, ref_mem[adr[11:2]]);
      end
      @(posedge clk);
      if (we) ref_mem[adr[11:2]] = din;
      #1;
      checks++;
      if (dout !== ref_mem[adr[11:2]]) begin
        failures++; $display("FAIL after edge adr=%h dout=%h exp=%h", adr, dout, ref_mem[adr[11:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
