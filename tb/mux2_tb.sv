// Self-checking testbench for mux2: random inputs at two widths, both selects.
module mux2_tb;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  logic [4:0]  a5, b5, y5;
  logic        s;

  mux2 #(.WIDTH(32)) dut32 (.in0(a), .in1(b), .sel(s), .out(y));
  mux2 #(.WIDTH(5))  dut5  (.in0(a5), .in1(b5), .sel(s), .out(y5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; a5 = 5'($urandom); b5 = 5'($urandom);
      s = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? b : a)) begin
        failures++; $display("FAIL mux32 sel=%0d y=%h", s, y);
      end
      checks++;
      if (y5 !== (i[0] ? b5 : a5)) begin
        failures++; $display("FAIL mux5 sel=%0d y=%h", s, y5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
