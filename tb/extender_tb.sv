// Self-checking testbench for extender: zero and sign extension of edge and
// random immediates, compared against integer arithmetic.
module extender_tb;
  int checks = 0, failures = 0;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] y, exp_y;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [15:0] v, logic op);
    int signed sv;
    imm = v; ext_op = op;
    #1;
    sv = int'(signed'(v));
    exp_y = op ? 32'(sv) : 32'(int'(v));
    checks++;
    if (y !== exp_y) begin
      failures++; $display("FAIL imm=%h op=%0d y=%h exp=%h", v, op, y, exp_y);
    end
  endtask

  initial begin
    check(16'h0000, 0); check(16'h0000, 1);
    check(16'h7fff, 0); check(16'h7fff, 1);
    check(16'h8000, 0); check(16'h8000, 1);
    check(16'hffff, 0); check(16'hffff, 1);
    for (int i = 0; i < 200; i++) check(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
