// word_proc: the word-wide version of the stored-program processor. The organisation is
// that of one_gate_proc, with every slot, input and output W bits wide and an ALU in place
// of the single gate, plus a branch so that programs can loop and choose:
//   READ   (00): slot out   <= input in0
//   ALU    (01): slot out   <= ALU(func, slot in0, slot in1)
//   BRANCH (10): if bit 0 of slot in0 is 1, PC <= PC + slot in1 (two's complement, so
//                the jump may go backwards); otherwise PC <= PC + 1
//   WRITE  (11): output out <= ALU(func, slot in0, slot in1), e.g. AND x,x to copy x
// One instruction per clock cycle; fetch, read, operate and commit as in one_gate_proc.
// Interface: load a program with prog_we/prog_addr/prog_data, then raise run; the PC
// starts at 0 after reset. Inputs/outputs are packed arrays of 8 words.
// Follows the lecture: W-bit ALU words (8-bit examples), the ALU codes it lists, the branch
// condition "SRC1[0] == 1, to PC + SRC2", WRITE = 11. This design's choices: reuse of the
// one-gate instruction layout, BRANCH = 10, 16-word instruction memory, the XOR/OR codes.
module word_proc
  import spp_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter int unsigned PC_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               prog_we,
  input  logic [PC_W-1:0]    prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  input  logic [7:0][W-1:0]  in,
  output logic [7:0][W-1:0]  out,
  output logic [PC_W-1:0]    pc
);
  instr_t         instr;
  logic [W-1:0]   a, b, y, in_sel, value;
  logic           wb_en, out_ld, taken;
  logic [PC_W-1:0] target;
  logic [W-1:0]   in_arr  [8];
  logic [W-1:0]   out_arr [8];

  always_comb begin
    wb_en  = run && (instr.typ == W_READ || instr.typ == W_ALU);
    out_ld = run && (instr.typ == W_WRITE);
    taken  = (instr.typ == W_BRANCH) && a[0];
    target = pc + PC_W'(b);                  // offset taken modulo the PC range
  end

  pc_counter #(.AW(PC_W)) u_pc (
    .clk, .rst_n, .en(run), .load(taken), .target, .pc
  );

  instr_mem #(.AW(PC_W), .IW(INSTR_W)) u_imem (
    .clk, .prog_we, .prog_addr, .prog_data, .addr(pc), .data(instr)
  );

  reg_ram #(.AW(SLOT_AW), .W(W)) u_mem_l (
    .clk, .rst_n, .write(wb_en), .wa(instr.out), .din(value), .ra(instr.in0), .dout(a)
  );
  reg_ram #(.AW(SLOT_AW), .W(W)) u_mem_r (
    .clk, .rst_n, .write(wb_en), .wa(instr.out), .din(value), .ra(instr.in1), .dout(b)
  );

  alu #(.W(W)) u_alu (.op(instr.func), .a, .b, .y);

  always_comb
    for (int k = 0; k < 8; k++) in_arr[k] = in[k];

  input_mux #(.SW(IO_AW), .W(W)) u_inmux (.in(in_arr), .sel(instr.in0), .y(in_sel));

  always_comb value = (instr.typ == W_READ) ? in_sel : y;

  output_load_ctrl #(.SW(IO_AW), .W(W)) u_out (
    .clk, .rst_n, .load(out_ld), .sel(instr.out), .value, .out(out_arr)
  );

  always_comb
    for (int k = 0; k < 8; k++) out[k] = out_arr[k];

  wb_copies_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                    (instr.in0 == instr.in1) |-> (a == b));
endmodule
