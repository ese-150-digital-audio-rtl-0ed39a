// tb_preclass1_gates: all eight input combinations; o1 must be 1 when at least two inputs
// are 1 and o2 when an odd number are 1 (counted, not computed with the design's gates).
module tb_preclass1_gates;
  int checks = 0, failures = 0;
  logic a, b, c, o1, o2;
  preclass1_gates dut (.a, .b, .c, .o1, .o2);
  initial begin
    #1000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) begin
      int ones;
      {a, b, c} = 3'(k);
      ones = int'(a) + int'(b) + int'(c);
      #1 checks += 2;
      if (o1 !== (ones >= 2)) begin failures++; $display("FAIL o1 abc=%b", k[2:0]); end
      if (o2 !== (ones % 2 == 1)) begin failures++; $display("FAIL o2 abc=%b", k[2:0]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
