// tb_mux_dff: q must take d as it was just before each rising clock edge and hold it,
// whatever d does in between (d is toggled in both clock phases).
module tb_mux_dff;
  int checks = 0, failures = 0;
  logic clk = 0, d = 0, q, exp;
  mux_dff dut (.clk, .d, .q);
  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int n = 0; n < 200; n++) begin
      #2 d = 1'($urandom);        // clk low: master follows d
      #3 exp = d; clk = 1;        // rising edge
      #1 checks++;
      if (q !== exp) begin failures++; $display("FAIL edge %0d q=%b exp=%b", n, q, exp); end
      #1 d = ~d;                  // clk high: change must not reach q
      #2 checks++;
      if (q !== exp) begin failures++; $display("FAIL hold-high %0d", n); end
      #1 clk = 0;
      #1 d = ~exp;                // clk low again: q still holds
      #1 checks++;
      if (q !== exp) begin failures++; $display("FAIL hold-low %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
