// prog_gate: a programmable gate whose truth table is held in state. Four flip-flops keep
// the table; a lut2 (mux tree) evaluates it for the current inputs. Loading a new table
// with cfg_we changes the gate's function from the next clock edge on.
// Interface: cfg_we/cfg_tt write the table (same bit order as lut2: leftmost bit is the
// output for in1 = in0 = 0); in0/in1 -> o is combinational. Reset clears the table, so the
// gate outputs 0 until programmed (reset value is this design's choice).
module prog_gate (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cfg_we,
  input  logic [3:0] cfg_tt,
  input  logic       in0,
  input  logic       in1,
  output logic       o
);
  logic [3:0] tt_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      tt_q <= '0;
    else if (cfg_we) tt_q <= cfg_tt;

  lut2 u_lut (.tt(tt_q), .in0(in0), .in1(in1), .o(o));
endmodule
