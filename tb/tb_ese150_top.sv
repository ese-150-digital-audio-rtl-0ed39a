// tb_ese150_top: end-to-end run of everything in ese150_top at its default parameters.
//  - one-gate processor: the example program for all eight (a,b,c), results compared
//    with the fixed-gate circuit p1 and with counted ones; run again with WRITE coded 10;
//  - word-wide processor: x * n by a branch loop, then a program that sends every ALU
//    operation to an output, compared with values worked out here;
//  - programmable gate: programmed as AND, OR, XOR, SEL0 in turn;
//  - mux-latch flip-flop: random data sampled on ff_clk edges.
// Counts how often each mechanism happened (READ, GATE and WRITE instructions, both WRITE
// codes, each gate function, branch taken and not taken, every ALU operation, a gate
// reprogramming, a flip-flop capture) and fails any that never happened.
module tb_ese150_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic og_run = 0, og_prog_we = 0, wp_run = 0, wp_prog_we = 0;
  logic [3:0] og_prog_addr = '0, wp_prog_addr = '0, og_pc, wp_pc;
  logic [14:0] og_prog_data = '0, wp_prog_data = '0;
  logic [7:0] og_in = '0, og_out;
  logic [7:0][7:0] wp_in = '0, wp_out;
  logic pg_cfg_we = 0, pg_in0 = 0, pg_in1 = 0, pg_o;
  logic [3:0] pg_cfg_tt = '0;
  logic p1_a = 0, p1_b = 0, p1_c = 0, p1_o1, p1_o2;
  logic ff_clk = 0, ff_d = 0, ff_q;

  ese150_top dut (.*);
  always #5 clk = ~clk;

  // mechanism counters
  int n_read, n_gate, n_write11, n_write10, n_and, n_or, n_xor, n_sel0;
  int n_taken, n_not_taken, n_wp_read, n_wp_write, n_reprog, n_ff;
  int n_alu [string];

  always @(posedge clk) if (rst_n) begin
    if (og_run) begin
      automatic logic [14:0] i = dut.u_ogp.instr;
      case (i[14:13])
        2'b00: n_read++;
        2'b01: begin
          n_gate++;
          case (i[12:9]) 4'b0001: n_and++; 4'b0111: n_or++; 4'b0110: n_xor++; default: ; endcase
        end
        2'b10: n_write10++;
        2'b11: n_write11++;
      endcase
      if (i[14] && i[12:9] == 4'b0101) n_sel0++;
    end
    if (wp_run) begin
      automatic logic [14:0] i = dut.u_wp.instr;
      case (i[14:13])
        2'b00: n_wp_read++;
        2'b10: if (dut.u_wp.a[0]) n_taken++; else n_not_taken++;
        2'b11: n_wp_write++;
        default: ;
      endcase
      if (i[14:13] == 2'b01 || i[14:13] == 2'b11)
        case (i[12:9])
          4'b0000: n_alu["ADD"]++;  4'b0010: n_alu["SUB"]++;  4'b0001: n_alu["INV"]++;
          4'b1110: n_alu["SLL"]++;  4'b1100: n_alu["SLR"]++;  4'b1000: n_alu["AND"]++;
          4'b0110: n_alu["XOR"]++;  4'b0111: n_alu["OR"]++;   default: ;
        endcase
    end
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic og_load(logic [14:0] p [16]);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk) og_prog_we = 1; og_prog_addr = 4'(k); og_prog_data = p[k];
    end
    @(negedge clk) og_prog_we = 0;
  endtask

  task automatic wp_load(logic [14:0] p [16]);
    for (int k = 0; k < 16; k++) begin
      @(negedge clk) wp_prog_we = 1; wp_prog_addr = 4'(k); wp_prog_data = p[k];
    end
    @(negedge clk) wp_prog_we = 0;
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 0; og_run = 0; wp_run = 0;
    @(negedge clk) rst_n = 1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [14:0] p [16];
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---------------- one-gate processor vs. fixed gates
    p = '{15'b00_0000_000_000_000, 15'b00_0000_001_000_001, 15'b00_0000_010_000_010,
          15'b01_0001_000_001_011, 15'b01_0001_001_010_100, 15'b01_0111_011_100_011,
          15'b01_0001_000_010_100, 15'b01_0111_011_100_101, 15'b01_0110_000_001_011,
          15'b01_0110_011_010_110, 15'b11_0101_110_000_001, 15'b11_0101_101_000_000,
          15'b0, 15'b0, 15'b0, 15'b0};
    for (int variant = 0; variant < 2; variant++) begin
      if (variant == 1) begin p[10][13] = 1'b0; p[11][13] = 1'b0; end
      og_load(p);
      for (int v = 0; v < 8; v++) begin
        int ones;
        do_reset();
        {p1_c, p1_b, p1_a} = 3'(v);
        ones = int'(p1_a) + int'(p1_b) + int'(p1_c);
        og_in = {5'b0, p1_c, p1_b, p1_a};
        og_run = 1;
        repeat (12) @(posedge clk);
        #1;
        chk(og_out[0] == p1_o1 && og_out[1] == p1_o2, $sformatf("processor vs gates v=%0d", v));
        chk(p1_o1 == (ones >= 2) && p1_o2 == (ones % 2 == 1), $sformatf("gates v=%0d", v));
        @(negedge clk) og_run = 0;
      end
    end

    // ---------------- word-wide processor: multiply loop
    p = '{15'b00_0000_000_000_000, 15'b00_0000_001_000_001, 15'b00_0000_011_000_011,
          15'b01_0010_100_100_100, 15'b01_0000_100_000_100, 15'b01_1100_001_000_001,
          15'b10_0000_001_011_000, 15'b11_1000_100_100_000,
          15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0};
    wp_load(p);
    for (int n = 1; n <= 5; n++) begin
      do_reset();
      wp_in = '0; wp_in[0] = 8'd37; wp_in[1] = 8'((1 << n) - 1); wp_in[3] = 8'hFE;
      wp_run = 1;
      repeat (5 + 3 * n) @(posedge clk);
      #1 chk(wp_out[0] == 8'(37 * n), $sformatf("multiply n=%0d got %0d", n, wp_out[0]));
      @(negedge clk) wp_run = 0;
    end

    // ---------------- word-wide processor: every ALU operation on 0x18, 0x14
    p = '{15'b00_0000_000_000_000,   // s0 = 0x18
          15'b00_0000_001_000_001,   // s1 = 0x14
          15'b11_0000_000_001_000,   // out0 = ADD
          15'b11_0010_000_001_001,   // out1 = SUB
          15'b11_0001_000_001_010,   // out2 = INV
          15'b11_1110_000_001_011,   // out3 = SLL
          15'b11_1100_000_001_100,   // out4 = SLR
          15'b11_1000_000_001_101,   // out5 = AND
          15'b11_0110_000_001_110,   // out6 = XOR
          15'b11_0111_000_001_111,   // out7 = OR
          15'b0, 15'b0, 15'b0, 15'b0, 15'b0, 15'b0};
    wp_load(p);
    do_reset();
    wp_in = '0; wp_in[0] = 8'h18; wp_in[1] = 8'h14;
    wp_run = 1;
    repeat (10) @(posedge clk);
    #1;
    chk(wp_out[0] == 8'h2C, "ALU ADD");
    chk(wp_out[1] == 8'h04, "ALU SUB");
    chk(wp_out[2] == 8'hE7, "ALU INV");
    chk(wp_out[3] == 8'h30, "ALU SLL");
    chk(wp_out[4] == 8'h0C, "ALU SLR");
    chk(wp_out[5] == 8'h10, "ALU AND");
    chk(wp_out[6] == 8'h0C, "ALU XOR");
    chk(wp_out[7] == 8'h1C, "ALU OR");
    @(negedge clk) wp_run = 0;

    // ---------------- programmable gate
    begin
      logic [3:0] codes [4] = '{4'b0001, 4'b0111, 4'b0110, 4'b0101};
      foreach (codes[c]) begin
        @(negedge clk) pg_cfg_we = 1; pg_cfg_tt = codes[c];
        @(negedge clk) pg_cfg_we = 0;
        n_reprog++;
        for (int k = 0; k < 4; k++) begin
          logic e;
          {pg_in1, pg_in0} = 2'(k);
          e = (c == 0) ? (pg_in0 & pg_in1) : (c == 1) ? (pg_in0 | pg_in1) :
              (c == 2) ? (pg_in0 ^ pg_in1) : pg_in0;
          #1 chk(pg_o == e, $sformatf("prog gate code %b in=%0d", codes[c], k));
        end
      end
    end

    // ---------------- mux-latch flip-flop
    for (int n = 0; n < 20; n++) begin
      logic e;
      #2 ff_d = 1'($urandom);
      #2 e = ff_d; ff_clk = 1;
      #1 ff_d = ~ff_d;
      #1 chk(ff_q == e, "mux flip-flop capture");
      n_ff++;
      #2 ff_clk = 0;
    end

    // ---------------- mechanism coverage
    $display("READ %0d GATE %0d WRITE(11) %0d WRITE(10) %0d AND %0d OR %0d XOR %0d SEL0 %0d",
             n_read, n_gate, n_write11, n_write10, n_and, n_or, n_xor, n_sel0);
    $display("word READ %0d WRITE %0d branch taken %0d not taken %0d gate reprogram %0d ff %0d",
             n_wp_read, n_wp_write, n_taken, n_not_taken, n_reprog, n_ff);
    chk(n_read > 0 && n_gate > 0 && n_write11 > 0 && n_write10 > 0, "one-gate instruction types");
    chk(n_and > 0 && n_or > 0 && n_xor > 0 && n_sel0 > 0, "gate functions");
    chk(n_wp_read > 0 && n_wp_write > 0, "word READ/WRITE");
    chk(n_taken > 0 && n_not_taken > 0, "branch taken and not taken");
    foreach (n_alu[k]) $display("ALU %s %0d", k, n_alu[k]);
    chk(n_alu.num() == 8, "all eight ALU operations used");
    chk(n_reprog > 0 && n_ff > 0, "gate reprogram and flip-flop capture");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
