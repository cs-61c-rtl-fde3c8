// Self-checking testbench for regfile: checks reset to zero, then random
// writes and reads on both ports against a reference array, including that
// register 0 stays zero, that a write lands only at the clock edge and that
// RegWr = 0 leaves the registers unchanged.
module regfile_tb;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [4:0]  rw, ra, rb;
  logic [31:0] busw, busa, busb;
  logic [31:0] ref_regs [32];

  regfile dut (.clk(clk), .rst_n(rst_n), .reg_wr(we), .rw(rw), .busw(busw),
               .ra(ra), .rb(rb), .busa(busa), .busb(busb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(logic [4:0] x, logic [4:0] y);
    ra = x; rb = y;
    #1;
    checks++;
    if (busa !== ref_regs[x] || busb !== ref_regs[y]) begin
      failures++;
      $display("FAIL read ra=%0d busa=%h exp=%h rb=%0d busb=%h exp=%h",
               x, busa, ref_regs[x], y, busb, ref_regs[y]);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) ref_regs[i] = '0;
    rw = 0; busw = 0; ra = 0; rb = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 32; i += 2) check_read(5'(i), 5'(i + 1));
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = ($urandom % 4) != 0; rw = 5'($urandom); busw = $urandom;
      if (n % 7 == 0) rw = 0;
      // before the edge the old value is still visible
      check_read(rw, 5'($urandom));
      @(posedge clk);
      if (we && rw != 0) ref_regs[rw] = busw;
      #1;
      check_read(rw, 5'($urandom));
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
