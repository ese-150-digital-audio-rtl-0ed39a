// alu: word-wide arithmetic and logic unit. A 4-bit operation code picks what is done to
// the two W-bit words a and b; all bit positions do the same thing, so a wider word costs
// no extra instruction bits. Operations and codes:
//   ADD 0000 a+b      SUB 0010 a-b      INV 0001 ~a      AND 1000 a&b
//   SLL 1110 a<<1     SLR 1100 a>>1     XOR 0110 a^b     OR  0111 a|b
// The first six codes are the lecture's; XOR and OR are named there as ALU operations but
// their codes are this design's choice. Shifts move by one place and fill with 0. Sums and
// differences wrap modulo 2**W; any other code gives 0. Combinational. Default W = 8.
module alu
  import spp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [3:0]   op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  always_comb
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_INV: y = ~a;
      ALU_AND: y = a & b;
      ALU_XOR: y = a ^ b;
      ALU_OR:  y = a | b;
      ALU_SLL: y = a << 1;
      ALU_SLR: y = a >> 1;
      default: y = '0;
    endcase
endmodule
