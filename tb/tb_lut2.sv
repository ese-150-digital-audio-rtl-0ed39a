// tb_lut2: checks the programmable gate. The four named codes must act as AND, OR, XOR and
// "pass in0"; then every one of the 16 tables is checked on all four input pairs against
// the rule "leftmost table bit is the output for in1 = in0 = 0".
module tb_lut2;
  import spp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] tt;
  logic in0, in1, o;
  lut2 dut (.tt, .in0, .in1, .o);

  task automatic chk(logic exp, string what);
    #1;
    checks++;
    if (o !== exp) begin
      failures++;
      $display("FAIL %s tt=%b in0=%b in1=%b o=%b exp=%b", what, tt, in0, in1, o, exp);
    end
  endtask

  initial begin
    #5000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 4; k++) begin
      in0 = k[0]; in1 = k[1];
      tt = F_AND;  chk(in0 & in1, "AND");
      tt = F_OR;   chk(in0 | in1, "OR");
      tt = F_XOR;  chk(in0 ^ in1, "XOR");
      tt = F_SEL0; chk(in0, "SEL0");
      tt = F_NONE; chk(1'b0, "NONE");
    end
    for (int t = 0; t < 16; t++)
      for (int k = 0; k < 4; k++) begin
        string s;
        tt = 4'(t); in0 = k[0]; in1 = k[1];
        s = $sformatf("%b", tt);            // s[0] is the leftmost character
        chk(s[k] == "1", "table");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
