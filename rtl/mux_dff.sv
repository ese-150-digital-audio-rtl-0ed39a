// mux_dff: an edge-triggered flip-flop made of two multiplexer latches, master and slave.
// The master mux passes d while clk is 0 and feeds back its own output (holds) while clk is
// 1; the slave mux is steered by the inverted clock, so it passes the master while clk is 1
// and holds while clk is 0. Together q takes the value d had just before the rising edge of
// clk and keeps it for the whole cycle.
// The two always_latch blocks are the two mux-with-feedback latches; the latch warnings a
// lint tool reports for them are intended, since the latches are the point of this circuit.
// No reset: q is defined after the first rising edge.
module mux_dff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic m;

  always_latch
    if (!clk) m = d;       // master: transparent while clk = 0

  always_latch
    if (clk) q = m;        // slave: transparent while clk = 1
endmodule
