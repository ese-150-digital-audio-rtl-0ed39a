// tb_alu: the lecture's worked 8-bit examples on a = 0x18, b = 0x14 (ADD 0x2C, SUB 0x04,
// INV 0xE7, XOR 0x0C, shift right 0x0C), then random operands against a reference, and a
// 16-bit instance.
module tb_alu;
  import spp_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] op;
  logic [7:0] a, b, y;
  logic [15:0] a16, b16, y16;
  alu dut (.op, .a, .b, .y);
  alu #(.W(16)) dut16 (.op, .a(a16), .b(b16), .y(y16));

  function automatic logic [15:0] model(logic [3:0] o, logic [15:0] x, logic [15:0] z, int w);
    logic [15:0] m = 16'((32'd1 << w) - 1);
    case (o)
      4'b0000: return (x + z) & m;
      4'b0010: return (x - z) & m;
      4'b0001: return ~x & m;
      4'b1110: return (x * 2) & m;
      4'b1100: return x / 2;
      4'b1000: return x & z;
      4'b0110: return x ^ z;
      4'b0111: return x | z;
      default: return '0;
    endcase
  endfunction

  task automatic chk(logic [7:0] exp, string what);
    #1 checks++;
    if (y !== exp) begin failures++; $display("FAIL %s op=%b a=%h b=%h y=%h exp=%h", what, op, a, b, y, exp); end
  endtask

  initial begin
    #100000 failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 8'h18; b = 8'h14;
    op = 4'b0000; chk(8'h2C, "ADD example");
    op = 4'b0010; chk(8'h04, "SUB example");
    op = 4'b0001; chk(8'hE7, "INV example");
    op = 4'b0110; chk(8'h0C, "XOR example");
    op = 4'b1100; chk(8'h0C, "SLR example");
    op = 4'b1110; chk(8'h30, "SLL");
    op = 4'b1000; chk(8'h10, "AND");
    for (int n = 0; n < 2000; n++) begin
      op = 4'($urandom); a = 8'($urandom); b = 8'($urandom);
      a16 = 16'($urandom); b16 = 16'($urandom);
      chk(8'(model(op, 16'(a), 16'(b), 8)), "random");
      checks++;
      if (y16 !== model(op, a16, b16, 16)) begin failures++; $display("FAIL16 op=%b", op); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
