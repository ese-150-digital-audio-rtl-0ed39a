// tb_word_proc: runs the word-wide processor.
// Part 1: a multiply-by-repeated-addition loop (x * n, n given as a mask of n ones that
// is shifted right each pass; the backward branch repeats while bit 0 of the mask is 1).
// The product must appear in output 0 exactly after 4 + 3n + 1 clock edges (one
// instruction per cycle). Part 2: random programs, branches included, against an
// instruction-level model written here; all outputs and the PC are compared every cycle.
module tb_word_proc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [3:0]  prog_addr = '0, pc;
  logic [14:0] prog_data = '0;
  logic [7:0][7:0] in = '0, out;

  word_proc dut (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data, .in, .out, .pc);
  always #5 clk = ~clk;

  logic [14:0] mult [8] = '{
    15'b00_0000_000_000_000,   // s0 = in0 (x)
    15'b00_0000_001_000_001,   // s1 = in1 (mask)
    15'b00_0000_011_000_011,   // s3 = in3 (offset -2)
    15'b01_0010_100_100_100,   // s4 = s4 - s4 = 0
    15'b01_0000_100_000_100,   // s4 = s4 + s0         (loop)
    15'b01_1100_001_000_001,   // s1 = s1 >> 1
    15'b10_0000_001_011_000,   // if s1[0]: pc += s3
    15'b11_1000_100_100_000    // out0 = s4 & s4
  };

  task automatic load(logic [14:0] p [16]);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = 4'(k); prog_data = p[k];
    end
    @(negedge clk) prog_we = 0;
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0; run = 0;
    @(negedge clk) rst_n = 1;
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (pc=%0d out0=%h)", what, pc, out[0]); end
  endtask

  function automatic logic [7:0] alu_model(logic [3:0] f, logic [7:0] x, logic [7:0] z);
    case (f)
      4'b0000: return x + z;
      4'b0010: return x - z;
      4'b0001: return ~x;
      4'b1110: return {x[6:0], 1'b0};
      4'b1100: return {1'b0, x[7:1]};
      4'b1000: return x & z;
      4'b0110: return x ^ z;
      4'b0111: return x | z;
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0] m_mem [8];
  logic [7:0][7:0] m_out;
  logic [3:0] m_pc;
  function automatic void model_step(logic [14:0] i, logic [7:0][7:0] x);
    logic [1:0] t = i[14:13];
    int s0 = int'(i[8:6]), s1 = int'(i[5:3]), d = int'(i[2:0]);
    logic [7:0] r = alu_model(i[12:9], m_mem[s0], m_mem[s1]);
    logic [3:0] nxt = m_pc + 4'd1;
    case (t)
      2'b00: m_mem[d] = x[s0];
      2'b01: m_mem[d] = r;
      2'b10: if (m_mem[s0][0]) nxt = 4'((int'(m_pc) + int'(m_mem[s1])) % 16);
      2'b11: m_out[d] = r;
    endcase
    m_pc = nxt;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [14:0] p [16];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 16; k++) p[k] = (k < 8) ? mult[k] : 15'b01_0000_111_111_111;
    load(p);
    for (int n = 1; n <= 8; n++) begin
      automatic logic [7:0] x = 8'($urandom_range(255, 1)) | 8'h01;
      do_reset();
      in = '0;
      in[0] = x; in[1] = 8'((1 << n) - 1); in[3] = 8'hFE;
      run = 1;
      repeat (4 + 3 * n) @(posedge clk);
      #1 chk(out[0] == 8'h00, $sformatf("product not yet written n=%0d", n));
      chk(pc == 4'd7, "pc at the WRITE after the loop");
      @(posedge clk);
      #1 chk(out[0] == 8'(int'(x) * n), $sformatf("product x=%0d n=%0d got %0d", x, n, out[0]));
      @(negedge clk) run = 0;
    end
    for (int n = 0; n < 60; n++) begin
      for (int k = 0; k < 16; k++) p[k] = 15'($urandom);
      load(p);
      do_reset();
      foreach (m_mem[k]) m_mem[k] = '0;
      m_out = '0; m_pc = '0;
      run = 1;
      for (int cyc = 0; cyc < 48; cyc++) begin
        for (int k = 0; k < 8; k++) in[k] = 8'($urandom);
        model_step(p[m_pc], in);
        @(posedge clk);
        #1 chk(out == m_out && pc == m_pc, $sformatf("random program %0d cycle %0d", n, cyc));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
