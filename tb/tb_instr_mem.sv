// tb_instr_mem: writes every word through the program port, reads all back (read is
// combinational), and rewrites some words to check that a new program replaces the old.
module tb_instr_mem;
  int checks = 0, failures = 0;
  logic clk = 0, prog_we = 0;
  logic [3:0] prog_addr = '0, addr = '0;
  logic [14:0] prog_data = '0, data;
  logic [14:0] ref_mem [16];
  instr_mem dut (.clk, .prog_we, .prog_addr, .prog_data, .addr, .data);
  always #5 clk = ~clk;
  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int k = 0; k < 16; k++) begin
        if (pass == 0 || $urandom_range(1) == 1) begin
          @(negedge clk);
          prog_we = 1; prog_addr = 4'(k); prog_data = 15'($urandom);
          ref_mem[k] = prog_data;
        end
      end
      @(negedge clk) prog_we = 0;
      for (int k = 0; k < 16; k++) begin
        addr = 4'(k); #1 checks++;
        if (data !== ref_mem[k]) begin failures++; $display("FAIL addr %0d got %h exp %h", k, data, ref_mem[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
