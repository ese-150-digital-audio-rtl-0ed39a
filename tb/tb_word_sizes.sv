// tb_word_sizes: the word-wide processor at the wider word sizes used as examples of
// word-wide computing: adding two 16-bit numbers, multiplying two 16-bit numbers (by a
// shift-and-add loop, since multiply is not an ALU operation), and a 32-bit bitwise XOR.
// Results are compared with values computed here.
module tb_word_sizes;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [3:0]  prog_addr = '0, pc16, pc32;
  logic [14:0] prog_data = '0;
  logic [7:0][15:0] in16 = '0, out16;
  logic [7:0][31:0] in32 = '0, out32;

  word_proc #(.W(16)) dut16 (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data,
                             .in(in16), .out(out16), .pc(pc16));
  word_proc #(.W(32)) dut32 (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data,
                             .in(in32), .out(out32), .pc(pc32));
  always #5 clk = ~clk;

  task automatic load(logic [14:0] p [16]);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk) prog_we = 1; prog_addr = 4'(k); prog_data = p[k];
    end
    @(negedge clk) prog_we = 0;
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0; run = 0;
    @(negedge clk) rst_n = 1;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [14:0] p [16];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // add and xor: out0 = in0 + in1, out1 = in0 ^ in1
    p = '{15'b00_0000_000_000_000, 15'b00_0000_001_000_001,
          15'b11_0000_000_001_000, 15'b11_0110_000_001_001,
          15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0};
    load(p);
    for (int n = 0; n < 20; n++) begin
      do_reset();
      for (int k = 0; k < 8; k++) begin in16[k] = 16'($urandom); in32[k] = $urandom; end
      run = 1;
      repeat (4) @(posedge clk);
      #1;
      chk(out16[0] == 16'(int'(in16[0]) + int'(in16[1])), "16-bit add");
      chk(out32[1] == (in32[0] ^ in32[1]), "32-bit xor");
      @(negedge clk) run = 0;
    end
    // 16-bit multiply by shift and add: 16 passes, each adds the (shifted) multiplicand
    // when bit 0 of the (shifted) multiplier is 1. A mask of 16 ones, shifted each pass,
    // ends the loop; slot 7 holds a constant 1 for an always-taken branch.
    p = '{15'b00_0000_000_000_000,   // 0  s0 = in0 (x)
          15'b00_0000_001_000_001,   // 1  s1 = in1 (y)
          15'b00_0000_010_000_010,   // 2  s2 = in2 (+2)
          15'b00_0000_011_000_011,   // 3  s3 = in3 (-6)
          15'b00_0000_100_000_101,   // 4  s5 = in4 (mask 0xFFFF)
          15'b00_0000_111_000_111,   // 5  s7 = in7 (1)
          15'b01_0010_100_100_100,   // 6  s4 = 0
          15'b10_0000_001_010_000,   // 7  loop: if s1[0]: pc += 2 (to the add)
          15'b10_0000_111_010_000,   // 8  else: pc += 2 (over the add)
          15'b01_0000_100_000_100,   // 9  s4 = s4 + s0
          15'b01_1110_000_000_000,   // 10 s0 = s0 << 1
          15'b01_1100_001_000_001,   // 11 s1 = s1 >> 1
          15'b01_1100_101_000_101,   // 12 s5 = s5 >> 1
          15'b10_0000_101_011_000,   // 13 if s5[0]: pc += -6 (to 7)
          15'b11_1000_100_100_000,   // 14 out0 = s4
          15'b0};
    load(p);
    for (int n = 0; n < 6; n++) begin
      logic [15:0] x, y;
      x = 16'($urandom); y = 16'($urandom);
      if (n == 0) begin x = 16'd1234; y = 16'd56; end
      do_reset();
      in16 = '0;
      in16[0] = x; in16[1] = y; in16[2] = 16'd2; in16[3] = 16'(-6);
      in16[4] = 16'hFFFF; in16[7] = 16'd1;
      run = 1;
      // 7 setup + 16 passes of 6 instructions (add path and skip path alike) + 1 write
      repeat (7 + 16 * 6 + 1) @(posedge clk);
      #1 chk(out16[0] == 16'(int'(x) * int'(y)), $sformatf("16-bit multiply %0d*%0d got %0d", x, y, out16[0]));
      @(negedge clk) run = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
