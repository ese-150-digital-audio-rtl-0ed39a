// input_mux: brings the outside world into the processor. Selects input number sel out of
// 2**SW inputs of W bits each; a READ instruction writes the selected value into the data
// memory. Combinational. Defaults: 8 inputs of 1 bit (the one-gate processor).
module input_mux #(
  parameter int unsigned SW = 3,
  parameter int unsigned W  = 1
) (
  input  logic [W-1:0]  in [2**SW],
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  y
);
  always_comb y = in[sel];
endmodule
