// tb_write_decoder: for the 4-output case checks w0..w3 against the lecture's equations
// w0 = Write & !WA[1] & !WA[0], ..., w3 = Write & WA[1] & WA[0]; then an 8-output
// instance for one-hot-ness.
module tb_write_decoder;
  int checks = 0, failures = 0;
  logic write;
  logic [1:0] wa;
  logic [3:0] w;
  logic [2:0] wa8;
  logic [7:0] w8;
  write_decoder dut (.write, .wa, .w);
  write_decoder #(.AW(3)) dut8 (.write, .wa(wa8), .w(w8));
  initial begin
    #5000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int k = 0; k < 8; k++) begin
      logic [3:0] exp;
      {write, wa} = 3'(k);
      exp[0] = write & !wa[1] & !wa[0];
      exp[1] = write & !wa[1] &  wa[0];
      exp[2] = write &  wa[1] & !wa[0];
      exp[3] = write &  wa[1] &  wa[0];
      #1 checks++;
      if (w !== exp) begin failures++; $display("FAIL write=%b wa=%d w=%b", write, wa, w); end
    end
    for (int k = 0; k < 16; k++) begin
      {write, wa8} = 4'(k);
      #1 checks++;
      if (w8 !== (write ? (8'd1 << wa8) : 8'd0)) begin
        failures++; $display("FAIL8 write=%b wa=%d w=%b", write, wa8, w8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
