// Self-checking testbench for alu: ADD, SUB and OR on edge and random
// operands, and the Equal flag for equal and unequal operands under SUB.
module alu_tb;
  import mips_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, r;
  logic        eq;
  alu_ctr_e    op;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(r), .equal(eq));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] x, logic [31:0] y, logic [1:0] code);
    longint unsigned e;
    a = x; b = y; op = alu_ctr_e'(code);
    #1;
    case (code)
      2'b00:   e = (longint'(x) + longint'(y)) & 64'hffff_ffff;
      2'b01:   e = (longint'(x) - longint'(y)) & 64'hffff_ffff;
      default: e = longint'(x | y);
    endcase
    checks++;
    if (r !== e[31:0]) begin
      failures++; $display("FAIL op=%b a=%h b=%h r=%h exp=%h", code, x, y, r, e[31:0]);
    end
    checks++;
    if (eq !== (e[31:0] == 0)) begin
      failures++; $display("FAIL equal op=%b a=%h b=%h eq=%b", code, x, y, eq);
    end
  endtask

  initial begin
    logic [31:0] v;
    check(32'hffff_ffff, 32'h1, 2'b00);
    check(32'h0, 32'h1, 2'b01);
    check(32'h8000_0000, 32'h8000_0000, 2'b01);
    check(32'hf0f0_0000, 32'h0000_0f0f, 2'b10);
    check(32'h0, 32'h0, 2'b10);
    for (int i = 0; i < 300; i++) begin
      v = $urandom;
      check($urandom, $urandom, 2'(i % 3));
      check(v, v, 2'b01);   // equal operands under SUB
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
