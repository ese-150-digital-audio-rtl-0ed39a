// output_load_ctrl: the processor's output registers. When load is high, register sel
// captures value at the clock edge (a WRITE instruction); the others hold. A write_decoder
// turns sel into the per-register load enables. All registers reset to 0 (a choice of this
// design). Defaults: 8 registers of 1 bit.
module output_load_ctrl #(
  parameter int unsigned SW = 3,
  parameter int unsigned W  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [SW-1:0] sel,
  input  logic [W-1:0]  value,
  output logic [W-1:0]  out [2**SW]
);
  localparam int unsigned N = 2**SW;

  logic [N-1:0] ld;

  write_decoder #(.AW(SW)) u_dec (.write(load), .wa(sel), .w(ld));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < N; k++) out[k] <= '0;
    end else begin
      for (int k = 0; k < N; k++)
        if (ld[k]) out[k] <= value;
    end
endmodule
