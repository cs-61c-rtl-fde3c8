// End-to-end testbench for single_cycle_cpu, at the design's default sizes.
//
// Part 1 runs a directed program: a loop of sw / add / sub / beq / j that
// stores 10, 9, ..., 1 into memory, a second loop that reads them back with lw
// and sums them, then a store and load with a negative offset, an ori whose
// immediate has bit 15 set (must zero-extend), a write to register 0 (must be
// ignored) and a beq to itself as the end.  The final sum must be 55.
// Part 2 runs several programs of random instructions from the subset.
// Throughout, an instruction-level reference model runs alongside: every cycle
// the PC must match, and after every clock edge all 32 registers must match,
// which also proves one instruction completes per clock (CPI = 1).  Data
// memory is compared in full at the end of each program.  Each instruction,
// both beq outcomes and an ignored write to register 0 must occur at least once.
module single_cycle_cpu_tb;
  import mips_tb_pkg::*;
  localparam int IDEPTH = 1024;
  localparam int DDEPTH = 1024;

  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [31:0] prog_addr = 0, prog_wdata = 0;
  logic [31:0] pc, instr;
  mips_ref_model #(IDEPTH, DDEPTH) m;
  logic [31:0] prog [IDEPTH];
  int n_add, n_sub, n_ori, n_lw, n_sw, n_bt, n_bn, n_j, n_r0;

  single_cycle_cpu dut (
    .clk(clk), .rst_n(rst_n), .prog_we(prog_we), .prog_addr(prog_addr),
    .prog_wdata(prog_wdata), .pc(pc), .instr(instr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (pc=%h)", what, m.pc);
    end
  endtask

  // Hold the processor in reset, load prog[] into instruction memory, set data
  // memory to a known pattern, and start a fresh reference model.
  task automatic load_and_reset(int seed);
    rst_n = 0;
    m = new();
    for (int i = 0; i < IDEPTH; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 32'(i * 4); prog_wdata = prog[i];
      m.imem[i] = prog[i];
    end
    @(negedge clk);
    prog_we = 0;
    for (int i = 0; i < DDEPTH; i++) begin
      logic [31:0] v;
      v = 32'(i * 32'h9e37_79b9) ^ 32'(seed);
      dut.u_dp.u_dmem.mem[i] = v;
      m.dmem[i] = v;
    end
    @(negedge clk);
    rst_n = 1;
  endtask

  task automatic run(int ncycles);
    for (int c = 0; c < ncycles; c++) begin
      check(pc === m.pc, $sformatf("pc %h", pc));
      check(instr === m.imem[m.iidx(m.pc)], "instr");
      m.step();
      @(posedge clk);
      cycles++;
      #1;
      for (int r = 0; r < 32; r++) begin
        logic [31:0] v;
        v = (r == 0) ? 32'h0 : dut.u_dp.u_rf.regs[r];
        check(v === m.regs[r], $sformatf("reg %0d = %h, expected %h", r, v, m.regs[r]));
      end
      @(negedge clk);
    end
    for (int i = 0; i < DDEPTH; i++)
      check(dut.u_dp.u_dmem.mem[i] === m.dmem[i], $sformatf("dmem[%0d]", i));
    n_add += m.n_add; n_sub += m.n_sub; n_ori += m.n_ori; n_lw += m.n_lw;
    n_sw += m.n_sw; n_bt += m.n_beq_taken; n_bn += m.n_beq_not; n_j += m.n_j;
    n_r0 += m.n_r0_write;
  endtask

  function automatic logic [31:0] rand_instr();
    int k;
    logic [15:0] imm;
    k = int'($urandom % 8);
    imm = 16'($urandom);
    case (k)
      0: return enc_add(int'($urandom % 8), int'($urandom % 8), int'($urandom % 8));
      1: return enc_sub(int'($urandom % 8), int'($urandom % 8), int'($urandom % 8));
      2: return enc_ori(int'($urandom % 8), int'($urandom % 8), imm);
      3: return enc_lw(int'($urandom % 8), int'($urandom % 8), imm);
      4: return enc_sw(int'($urandom % 8), int'($urandom % 8), imm);
      5: return enc_beq(int'($urandom % 4), int'($urandom % 4), 16'(int'($urandom % 24) - 4));
      6: return enc_j(26'($urandom % IDEPTH));
      default: return $urandom;  // mostly outside the subset
    endcase
  endfunction

  initial begin
    n_add = 0; n_sub = 0; n_ori = 0; n_lw = 0; n_sw = 0; n_bt = 0; n_bn = 0; n_j = 0; n_r0 = 0;
    // ---- Part 1: directed program ----
    for (int i = 0; i < IDEPTH; i++) prog[i] = enc_beq(0, 0, 16'hffff);
    prog[0]  = enc_ori(1, 0, 16'h0100);   // r1 = base address
    prog[1]  = enc_ori(2, 0, 16'd10);     // r2 = count
    prog[2]  = enc_ori(3, 0, 16'd1);      // r3 = 1
    prog[3]  = enc_ori(5, 0, 16'd4);      // r5 = 4
    prog[4]  = enc_ori(6, 0, 16'd0);      // r6 = sum
    prog[5]  = enc_sw(2, 1, 16'd0);       // L1: M[r1] = r2
    prog[6]  = enc_add(1, 1, 5);          //     r1 += 4
    prog[7]  = enc_sub(2, 2, 3);          //     r2 -= 1
    prog[8]  = enc_beq(2, 0, 16'd1);      //     if r2 == 0 skip the jump
    prog[9]  = enc_j(26'd5);              //     goto L1
    prog[10] = enc_ori(1, 0, 16'h0100);
    prog[11] = enc_ori(2, 0, 16'd10);
    prog[12] = enc_lw(7, 1, 16'd0);       // L2: r7 = M[r1]
    prog[13] = enc_add(6, 6, 7);          //     sum += r7
    prog[14] = enc_add(1, 1, 5);
    prog[15] = enc_sub(2, 2, 3);
    prog[16] = enc_beq(2, 0, 16'd1);
    prog[17] = enc_j(26'd12);             //     goto L2
    prog[18] = enc_sw(6, 1, 16'hfffc);    // M[r1 - 4] = sum
    prog[19] = enc_lw(8, 1, 16'hfffc);    // r8 = M[r1 - 4]
    prog[20] = enc_ori(9, 0, 16'h8001);   // r9 = 0x00008001
    prog[21] = enc_add(0, 6, 6);          // write to r0, ignored
    prog[22] = enc_beq(0, 0, 16'hffff);   // stay here
    load_and_reset(1);
    run(120);
    check(dut.u_dp.u_rf.regs[6] == 32'd55, "sum in r6");
    check(dut.u_dp.u_rf.regs[8] == 32'd55, "sum reloaded in r8");
    check(dut.u_dp.u_rf.regs[9] == 32'h0000_8001, "ori zero-extends");
    check(pc == 32'd88, "program ends at its last beq");
    check(dut.u_dp.u_dmem.mem[(32'h100 >> 2) + 9] == 32'd55, "sum stored");
    // ---- Part 2: random programs ----
    for (int p = 0; p < 8; p++) begin
      for (int i = 0; i < IDEPTH; i++) prog[i] = rand_instr();
      load_and_reset(p + 100);
      run(2000);
    end
    $display("executed: add=%0d sub=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d j=%0d r0_writes=%0d cycles=%0d",
             n_add, n_sub, n_ori, n_lw, n_sw, n_bt, n_bn, n_j, n_r0, cycles);
    check(n_add > 0, "add executed");
    check(n_sub > 0, "sub executed");
    check(n_ori > 0, "ori executed");
    check(n_lw > 0, "lw executed");
    check(n_sw > 0, "sw executed");
    check(n_bt > 0, "beq taken");
    check(n_bn > 0, "beq not taken");
    check(n_j > 0, "j executed");
    check(n_r0 > 0, "write to r0 ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
