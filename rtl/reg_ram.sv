// reg_ram: random-access memory built as a collection of registers. A write_decoder picks
// the register that captures din on the clock edge when write is high; a read multiplexer
// selects register ra onto dout. Reading is combinational, so a value written at one edge
// is read back from the next cycle on ("return last value written").
// The lecture's memory uses latches; this one uses edge-triggered registers so that a
// processor can read and write the same slot in one cycle without a race (a choice of this
// design). Defaults: 4 entries of 1 bit, the lecture's example. Contents reset to 0.
module reg_ram #(
  parameter int unsigned AW = 2,
  parameter int unsigned W  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          write,
  input  logic [AW-1:0] wa,
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] ra,
  output logic [W-1:0]  dout
);
  localparam int unsigned N = 2**AW;

  logic [N-1:0] wen;
  logic [W-1:0] mem_q [N];

  write_decoder #(.AW(AW)) u_dec (.write(write), .wa(wa), .w(wen));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < N; k++) mem_q[k] <= '0;
    end else begin
      for (int k = 0; k < N; k++)
        if (wen[k]) mem_q[k] <= din;
    end

  always_comb dout = mem_q[ra];
endmodule
