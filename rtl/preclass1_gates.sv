// preclass1_gates: the lecture's example computation built directly from gates, one gate
// per operation: o1 = a&b | b&c | a&c (majority, three AND and two OR) and
// o2 = a ^ b ^ c (two XOR). It is the same function the one-gate processor evaluates in
// time, one gate per instruction. Combinational.
module preclass1_gates (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic o1,
  output logic o2
);
  logic ab, bc, ac, t, x;
  always_comb begin
    ab = a & b;
    bc = b & c;
    ac = a & c;
    t  = ab | bc;
    o1 = t | ac;
    x  = a ^ b;
    o2 = x ^ c;
  end
endmodule
