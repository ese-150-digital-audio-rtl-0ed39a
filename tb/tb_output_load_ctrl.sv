// tb_output_load_ctrl: random loads against a reference; only register sel changes, only
// at a clock edge with load high; reset clears all registers.
module tb_output_load_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [2:0] sel = '0;
  logic [7:0] value = '0;
  logic [7:0] out [8];
  logic [7:0] ref_out [8];
  output_load_ctrl #(.SW(3), .W(8)) dut (.clk, .rst_n, .load, .sel, .value, .out);
  always #5 clk = ~clk;

  task automatic cmp(string what);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (out[k] !== ref_out[k]) begin failures++; $display("FAIL %s out[%0d]=%h exp %h", what, k, out[k], ref_out[k]); end
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (ref_out[k]) ref_out[k] = '0;
    repeat (2) @(posedge clk);
    #1 cmp("reset");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      load = 1'($urandom); sel = 3'($urandom); value = 8'($urandom);
      #1 cmp("before edge");
      @(posedge clk);
      if (load) ref_out[sel] = value;
      #1 cmp("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
