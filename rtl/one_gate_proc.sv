// one_gate_proc: a stored-program processor whose only compute element is one
// programmable two-input gate. All wire values of a logic circuit live in an 8-slot,
// 1-bit data memory; each clock cycle executes one instruction:
//   fetch  : instruction memory is read at the PC;
//   read   : slot in0 is read from the left memory copy and slot in1 from the right copy
//            (two copies give two read ports; every writeback goes to both);
//   operate: the gate applies the instruction's 4-bit truth table to the two values, or,
//            for READ, the input multiplexer picks external input in0;
//   commit : READ and GATE write the value into slot out of both memory copies, WRITE
//            loads output register out with it; the PC moves to PC + 1.
// Instruction format and codes: see spp_pkg (type, func, in0, in1, out; 15 bits).
// Interface: load a program with prog_we/prog_addr/prog_data, then raise run; the PC
// starts at 0 after reset and advances every cycle run is high, wrapping at the end of
// the instruction memory. Outputs are registered and change one cycle after the WRITE.
// Follows the lecture: one gate, 8 slots, 8 inputs, 8 outputs, the 15-bit format, and
// that WRITE does not write the data memory. This design's choices: the run/program
// interface, a 16-word instruction memory, flip-flop memories, reset to 0, and decoding
// both type codes 10 and 11 as WRITE.
module one_gate_proc
  import spp_pkg::*;
#(
  parameter int unsigned PC_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               prog_we,
  input  logic [PC_W-1:0]    prog_addr,
  input  logic [INSTR_W-1:0] prog_data,
  input  logic [7:0]         in,
  output logic [7:0]         out,
  output logic [PC_W-1:0]    pc
);
  instr_t     instr;
  logic       a, b, g, in_sel, value;
  logic       is_read, is_write, wb_en, out_ld;
  logic       in_arr  [8];
  logic       out_arr [8];

  pc_counter #(.AW(PC_W)) u_pc (
    .clk, .rst_n, .en(run), .load(1'b0), .target('0), .pc
  );

  instr_mem #(.AW(PC_W), .IW(INSTR_W)) u_imem (
    .clk, .prog_we, .prog_addr, .prog_data, .addr(pc), .data(instr)
  );

  // decode
  always_comb begin
    is_read  = (instr.typ == T_READ);
    is_write = instr.typ[1];                 // 10 or 11
    wb_en    = run && !is_write;             // READ and GATE write back
    out_ld   = run && is_write;
  end

  // data memory: two copies, written together, each read at its own address
  reg_ram #(.AW(SLOT_AW), .W(1)) u_mem_l (
    .clk, .rst_n, .write(wb_en), .wa(instr.out), .din(value), .ra(instr.in0), .dout(a)
  );
  reg_ram #(.AW(SLOT_AW), .W(1)) u_mem_r (
    .clk, .rst_n, .write(wb_en), .wa(instr.out), .din(value), .ra(instr.in1), .dout(b)
  );

  lut2 u_gate (.tt(instr.func), .in0(a), .in1(b), .o(g));

  always_comb
    for (int k = 0; k < 8; k++) in_arr[k] = in[k];

  input_mux #(.SW(IO_AW), .W(1)) u_inmux (.in(in_arr), .sel(instr.in0), .y(in_sel));

  always_comb value = is_read ? in_sel : g;

  output_load_ctrl #(.SW(IO_AW), .W(1)) u_out (
    .clk, .rst_n, .load(out_ld), .sel(instr.out), .value, .out(out_arr)
  );

  always_comb
    for (int k = 0; k < 8; k++) out[k] = out_arr[k];

  // the two memory copies must never disagree: check by writing both from one port
  wb_copies_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                    (instr.in0 == instr.in1) |-> (a == b));
endmodule
