// tb_reg_ram: random writes and reads against a reference array, on the default 4x1
// memory and on an 8x8 one. Checks that a read returns the last value written, that a
// write becomes visible only after its clock edge, and that reset clears every entry.
module tb_reg_ram;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic write;
  logic [2:0] wa, ra;
  logic [7:0] din, dout8;
  logic dout1;
  logic [7:0] ref8 [8];
  logic       ref1 [4];
  reg_ram dut1 (.clk, .rst_n, .write, .wa(wa[1:0]), .din(din[0]), .ra(ra[1:0]), .dout(dout1));
  reg_ram #(.AW(3), .W(8)) dut8 (.clk, .rst_n, .write, .wa, .din, .ra, .dout(dout8));
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    write = 0; wa = 0; ra = 0; din = 0;
    foreach (ref8[k]) ref8[k] = '0;
    foreach (ref1[k]) ref1[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      ra = 3'(k); #1 checks++;
      if (dout8 !== 8'h00 || dout1 !== 1'b0) begin failures++; $display("FAIL reset %0d", k); end
    end
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      write = 1'($urandom); wa = 3'($urandom); din = 8'($urandom); ra = 3'($urandom);
      #1 checks++;
      // before the edge: old contents
      if (dout8 !== ref8[ra] || dout1 !== ref1[ra[1:0]]) begin
        failures++; $display("FAIL read ra=%0d got %h/%b exp %h/%b", ra, dout8, dout1, ref8[ra], ref1[ra[1:0]]);
      end
      @(posedge clk);
      if (write) begin ref8[wa] = din; ref1[wa[1:0]] = din[0]; end
    end
    @(negedge clk) write = 0;
    for (int k = 0; k < 8; k++) begin
      ra = 3'(k); #1 checks++;
      if (dout8 !== ref8[k] || dout1 !== ref1[k%4]) begin failures++; $display("FAIL final %0d", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
