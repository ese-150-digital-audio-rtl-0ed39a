// tb_pc_counter: after reset the PC is 0; it steps by one per enabled cycle, holds while
// en is low, wraps from 15 to 0, and takes the target when load is high.
module tb_pc_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [3:0] target = '0, pc, exp;
  pc_counter dut (.clk, .rst_n, .en, .load, .target, .pc);
  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    exp = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (pc !== 4'd0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0); load = ($urandom_range(4) == 0); target = 4'($urandom);
      @(posedge clk);
      if (en) exp = load ? target : 4'((int'(exp) + 1) % 16);
      #1 checks++;
      if (pc !== exp) begin failures++; $display("FAIL pc=%0d exp=%0d", pc, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
