// tb_mux2: checks the 2:1 mux against its eight-row truth table (rows written out here,
// not computed from the operator the design uses).
module tb_mux2;
  int checks = 0, failures = 0;
  logic s, i0, i1, o;
  // rows {s,i0,i1,expected}
  logic [3:0] rows [8] = '{4'b0000, 4'b0010, 4'b0101, 4'b0111,
                           4'b1000, 4'b1011, 4'b1100, 4'b1111};
  mux2 dut (.s, .i0, .i1, .o);
  initial begin
    #1000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (rows[r]) begin
      {s, i0, i1} = rows[r][3:1];
      #1;
      checks++;
      if (o !== rows[r][0]) begin
        failures++;
        $display("FAIL s=%b i0=%b i1=%b o=%b", s, i0, i1, o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
