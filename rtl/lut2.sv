// lut2: programmable two-input gate. A 4-bit truth table picks which Boolean function of
// (in0, in1) the gate computes, so one physical gate can act as AND, OR, XOR, a selector or
// any other two-input function. Built as a tree of three 2:1 muxes: the first level is
// steered by in0, the second by in1.
// tt is written leftmost bit first for (in1,in0) = 00, 01, 10, 11, i.e. the output for
// (in1,in0) = k is tt[3-k]. With this order the lecture's codes AND = 0001, OR = 0111,
// XOR = 0110 and SEL0 = 0101 (passes in0) all hold; the bit order itself is this design's
// reading of those codes. Combinational, no clock.
module lut2 (
  input  logic [3:0] tt,
  input  logic       in0,
  input  logic       in1,
  output logic       o
);
  logic lo, hi;
  mux2 u_lo (.s(in0), .i0(tt[3]), .i1(tt[2]), .o(lo));   // in1 = 0 half
  mux2 u_hi (.s(in0), .i0(tt[1]), .i1(tt[0]), .o(hi));   // in1 = 1 half
  mux2 u_out(.s(in1), .i0(lo),    .i1(hi),    .o(o));
endmodule
