// mux2: the 2:1 multiplexer gate. Output is i0 when s = 0 and i1 when s = 1, exactly the
// eight-row truth table of the lecture. Purely combinational. It is the building block of
// the programmable gate (lut2) and of the mux-built flip-flop (mux_dff).
module mux2 (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic o
);
  always_comb o = s ? i1 : i0;
endmodule
