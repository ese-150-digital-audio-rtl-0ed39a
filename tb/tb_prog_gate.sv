// tb_prog_gate: the gate outputs 0 after reset, takes a new table only at a clock edge when
// cfg_we is high, and then computes that table's function.
module tb_prog_gate;
  import spp_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cfg_we = 0, in0 = 0, in1 = 0, o;
  logic [3:0] cfg_tt = '0;
  prog_gate dut (.clk, .rst_n, .cfg_we, .cfg_tt, .in0, .in1, .o);
  always #5 clk = ~clk;

  task automatic chk(logic exp, string what);
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL %s in0=%b in1=%b o=%b exp=%b", what, in0, in1, o, exp);
    end
  endtask

  function automatic logic f(logic [3:0] code, logic x0, logic x1);
    case (code)
      F_AND:   return x0 & x1;
      F_OR:    return x0 | x1;
      F_XOR:   return x0 ^ x1;
      F_SEL0:  return x0;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [3:0] codes [4] = '{F_AND, F_OR, F_XOR, F_SEL0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      {in1, in0} = 2'(k); #1 chk(1'b0, "after reset");
    end
    foreach (codes[c]) begin
      @(negedge clk);
      cfg_tt = codes[c]; cfg_we = 1;
      // the old table is still in force before the edge
      if (c > 0) begin in0 = 1; in1 = 1; #1 chk(f(codes[c-1], 1, 1), "before edge"); end
      @(negedge clk);
      cfg_we = 0; cfg_tt = '0;
      for (int k = 0; k < 4; k++) begin
        {in1, in0} = 2'(k); #1 chk(f(codes[c], in0, in1), "programmed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
