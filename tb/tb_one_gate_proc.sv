// tb_one_gate_proc: runs the one-gate processor.
// Part 1: the lecture's example program (o1 = majority(a,b,c), o2 = a^b^c) is loaded as
// literal 15-bit words, once with WRITE coded 11 and once with 10, and run for all eight
// values of a, b, c on inputs 0..2. One instruction per cycle: o2 must appear in output 1
// exactly after the 11th clock edge and o1 in output 0 after the 12th.
// Part 2: random programs on random inputs against an instruction-level model written
// here; every output register is compared after every cycle. Also checks that the PC
// holds while run is low.
module tb_one_gate_proc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, run = 0, prog_we = 0;
  logic [3:0]  prog_addr = '0, pc;
  logic [14:0] prog_data = '0;
  logic [7:0]  in = '0, out;

  one_gate_proc dut (.clk, .rst_n, .run, .prog_we, .prog_addr, .prog_data, .in, .out, .pc);
  always #5 clk = ~clk;

  // Lecture program; fields type|func|in0|in1|out
  logic [14:0] prog [12] = '{
    15'b00_0000_000_000_000,   // a  = in0          -> slot 0
    15'b00_0000_001_000_001,   // b  = in1          -> slot 1
    15'b00_0000_010_000_010,   // c  = in2          -> slot 2
    15'b01_0001_000_001_011,   // t1 = a & b        -> slot 3
    15'b01_0001_001_010_100,   // t2 = b & c        -> slot 4
    15'b01_0111_011_100_011,   // t1 = t1 | t2
    15'b01_0001_000_010_100,   // t2 = a & c
    15'b01_0111_011_100_101,   // o1 = t1 | t2      -> slot 5
    15'b01_0110_000_001_011,   // t1 = a ^ b
    15'b01_0110_011_010_110,   // o2 = t1 ^ c       -> slot 6
    15'b11_0101_110_000_001,   // output 1 = o2
    15'b11_0101_101_000_000    // output 0 = o1
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
    if (!cond) begin failures++; $display("FAIL %s (pc=%0d out=%b)", what, pc, out); end
  endtask

  // instruction-level reference model
  logic       m_mem [8];
  logic [7:0] m_out;
  function automatic void model_step(logic [14:0] i, logic [7:0] x);
    logic [1:0] t  = i[14:13];
    logic [3:0] f  = i[12:9];
    int         s0 = int'(i[8:6]), s1 = int'(i[5:3]), d = int'(i[2:0]);
    logic       g  = f[3 - (2 * int'(m_mem[s1]) + int'(m_mem[s0]))];
    if (t == 2'b00)      m_mem[d] = x[s0];
    else if (t == 2'b01) m_mem[d] = g;
    else                 m_out[d] = g;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [14:0] p [16];
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- part 1: the example program, both WRITE codes
    for (int variant = 0; variant < 2; variant++) begin
      for (int k = 0; k < 16; k++) p[k] = (k < 12) ? prog[k] : 15'b10_0000_000_000_111;
      if (variant == 1) begin p[10][14:13] = 2'b10; p[11][14:13] = 2'b10; end
      load(p);
      for (int v = 0; v < 8; v++) begin
        logic a, b, c, o1, o2;
        {c, b, a} = 3'(v);
        o1 = (int'(a) + int'(b) + int'(c)) >= 2;
        o2 = ((int'(a) + int'(b) + int'(c)) % 2) == 1;
        do_reset();
        in = {5'($urandom), c, b, a};
        run = 1;
        repeat (11) @(posedge clk);
        #1 chk(out[1] == o2 && out[0] == 1'b0, $sformatf("o2 after 11 edges v=%0d", v));
        chk(pc == 4'd11, "pc after 11 edges");
        @(posedge clk);
        #1 chk(out[1] == o2 && out[0] == o1, $sformatf("o1 after 12 edges v=%0d", v));
        chk(out[7:2] == 6'b0, "other outputs untouched");
        // hold: PC and outputs stay while run is low
        @(negedge clk) run = 0;
        repeat (3) @(posedge clk);
        #1 chk(pc == 4'd12 && out[1:0] == {o2, o1}, "hold while run low");
      end
    end
    // ---- part 2: random programs against the model
    for (int n = 0; n < 40; n++) begin
      for (int k = 0; k < 16; k++) p[k] = 15'($urandom);
      load(p);
      do_reset();
      foreach (m_mem[k]) m_mem[k] = 1'b0;
      m_out = '0;
      run = 1;
      for (int cyc = 0; cyc < 48; cyc++) begin
        in = 8'($urandom);
        model_step(p[pc], in);
        @(posedge clk);
        #1 chk(out == m_out, $sformatf("random program %0d cycle %0d", n, cyc));
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
