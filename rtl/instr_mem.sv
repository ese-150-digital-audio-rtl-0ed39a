// instr_mem: instruction memory of a stored-program processor. The program counter
// addresses it and the selected word comes out combinationally, so fetch, decode and
// execute of one instruction all fit in one clock cycle. A write port (prog_we, prog_addr,
// prog_data) loads a program; changing the contents changes what the processor computes.
// Defaults: 16 words of 15 bits. The 15-bit width is the lecture's instruction format; the
// depth is this design's choice (the lecture's example program has 12 instructions).
// Contents are not reset; load a program before running it.
module instr_mem #(
  parameter int unsigned AW = 4,
  parameter int unsigned IW = 15
) (
  input  logic          clk,
  input  logic          prog_we,
  input  logic [AW-1:0] prog_addr,
  input  logic [IW-1:0] prog_data,
  input  logic [AW-1:0] addr,
  output logic [IW-1:0] data
);
  logic [IW-1:0] mem_q [2**AW];

  always_ff @(posedge clk)
    if (prog_we) mem_q[prog_addr] <= prog_data;

  always_comb data = mem_q[addr];
endmodule
