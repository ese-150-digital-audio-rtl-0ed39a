// tb_input_mux: every select value on random 1-bit and 8-bit input sets.
module tb_input_mux;
  int checks = 0, failures = 0;
  logic       in1 [8];
  logic [7:0] in8 [8];
  logic [2:0] sel;
  logic       y1;
  logic [7:0] y8;
  input_mux dut1 (.in(in1), .sel, .y(y1));
  input_mux #(.SW(3), .W(8)) dut8 (.in(in8), .sel, .y(y8));
  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 50; n++) begin
      foreach (in1[k]) begin in1[k] = 1'($urandom); in8[k] = 8'($urandom); end
      for (int s = 0; s < 8; s++) begin
        sel = 3'(s); #1 checks++;
        if (y1 !== in1[s] || y8 !== in8[s]) begin failures++; $display("FAIL sel=%0d", s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
