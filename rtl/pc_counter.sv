// pc_counter: the program counter. Each enabled clock edge moves it to the next
// instruction: pc + 1 from its own adder, or, when load is high, the target supplied by the
// datapath (used for branches). It starts at 0 after reset and holds while en is low.
// Wraps modulo 2**AW. Output pc is the registered value.
module pc_counter #(
  parameter int unsigned AW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          load,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] pc
);
  logic [AW-1:0] pc_plus1;

  always_comb pc_plus1 = pc + AW'(1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pc <= '0;
    else if (en) pc <= load ? target : pc_plus1;
endmodule
