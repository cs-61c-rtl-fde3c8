// Self-checking testbench for ifu.  Loads random words into instruction
// memory, releases reset and then drives random nPC_sel, Equal and Jump every
// cycle.  A reference PC, computed from the next-PC rules (PC + 4, taken
// branch PC + 4 + SignExt(imm16) * 4 only when nPC_sel and Equal are both 1,
// jump {PC[31:28], target, 00}), is compared with pc every cycle, and instr
// with the loaded word at that PC.  Each next-PC case must occur.
module ifu_tb;
  localparam int DEPTH = 1024;
  int checks = 0, failures = 0;
  int n_seq = 0, n_br_taken = 0, n_br_not = 0, n_jump = 0;
  logic clk = 0, rst_n = 0;
  logic npc_sel = 0, equal = 0, jump = 0;
  logic prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0;
  logic [31:0] instr, pc, ref_pc, w;
  logic [31:0] ref_mem [DEPTH];

  ifu dut (.clk(clk), .rst_n(rst_n), .npc_sel(npc_sel), .equal(equal), .jump(jump),
           .instr(instr), .pc(pc), .prog_we(prog_we), .prog_addr(prog_addr),
           .prog_wdata(prog_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 32'(i * 4); prog_wdata = $urandom;
      ref_mem[i] = prog_wdata;
    end
    @(negedge clk); prog_we = 0;
    rst_n = 1;
    ref_pc = 0;
    for (int n = 0; n < 4000; n++) begin
      npc_sel = 1'($urandom); equal = 1'($urandom); jump = ($urandom % 5) == 0;
      #1;
      checks++;
      if (pc !== ref_pc) begin
        failures++; $display("FAIL cycle %0d pc=%h exp=%h", n, pc, ref_pc);
      end
      checks++;
      if (instr !== ref_mem[ref_pc[11:2]]) begin
        failures++; $display("FAIL cycle %0d instr=%h exp=%h", n, instr, ref_mem[ref_pc[11:2]]);
      end
      w = ref_mem[ref_pc[11:2]];
      if (jump) begin
        ref_pc = {ref_pc[31:28], w[25:0], 2'b00}; n_jump++;
      end else if (npc_sel && equal) begin
        ref_pc = ref_pc + 4 + 32'(signed'({w[15:0], 2'b00})); n_br_taken++;
      end else begin
        ref_pc = ref_pc + 4;
        if (npc_sel) n_br_not++; else n_seq++;
      end
      @(negedge clk);
    end
    $display("next-PC cases: seq=%0d br_taken=%0d br_not_taken=%0d jump=%0d",
             n_seq, n_br_taken, n_br_not, n_jump);
    if (n_seq == 0 || n_br_taken == 0 || n_br_not == 0 || n_jump == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
