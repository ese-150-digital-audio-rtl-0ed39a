// spp_pkg: shared types and encodings of the two stored-program processors.
//
// One-gate processor instruction (15 bits, most significant field first):
//   type[1:0] | func[3:0] | in0[2:0] | in1[2:0] | out[2:0]
// type: READ = 00 (input in0 -> slot out), GATE = 01 (slot in0 OP slot in1 -> slot out),
// WRITE = 1x (gate result of slot in0, in1 -> output register out). Both 10 and 11 decode
// as WRITE; 11 is the code listed with the encodings and 10 is the code used in the
// example program image, so either form of a program runs.
// func is a truth table, written leftmost-bit-first for the input pairs
// (in1,in0) = 00, 01, 10, 11: AND = 0001, OR = 0111, XOR = 0110, NONE = 0000,
// SEL0 = 0101 (passes slot in0).
//
// Word-wide processor instruction (15 bits, same field layout):
//   type: READ = 00, ALU = 01, BRANCH = 10, WRITE = 11; func is an ALU operation code.
// The ALU codes ADD, SUB, INV, SLL, SLR and AND are the lecture's; XOR and OR are this
// design's own choice of free codes.
package spp_pkg;

  localparam int unsigned SLOT_AW = 3;   // 8 data-memory slots
  localparam int unsigned IO_AW   = 3;   // 8 inputs and 8 outputs
  localparam int unsigned INSTR_W = 15;

  typedef enum logic [1:0] {
    T_READ  = 2'b00,
    T_GATE  = 2'b01,
    T_WRITE = 2'b11,
    T_WRITE_ALT = 2'b10
  } ogp_type_e;

  localparam logic [3:0] F_NONE = 4'b0000;
  localparam logic [3:0] F_AND  = 4'b0001;
  localparam logic [3:0] F_OR   = 4'b0111;
  localparam logic [3:0] F_XOR  = 4'b0110;
  localparam logic [3:0] F_SEL0 = 4'b0101;

  typedef enum logic [1:0] {
    W_READ   = 2'b00,
    W_ALU    = 2'b01,
    W_BRANCH = 2'b10,
    W_WRITE  = 2'b11
  } wp_type_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'b0000,
    ALU_INV = 4'b0001,
    ALU_SUB = 4'b0010,
    ALU_XOR = 4'b0110,
    ALU_OR  = 4'b0111,
    ALU_AND = 4'b1000,
    ALU_SLR = 4'b1100,
    ALU_SLL = 4'b1110
  } alu_op_e;

  typedef struct packed {
    logic [1:0]         typ;
    logic [3:0]         func;
    logic [SLOT_AW-1:0] in0;
    logic [SLOT_AW-1:0] in1;
    logic [SLOT_AW-1:0] out;
  } instr_t;

  function automatic instr_t mk_instr(logic [1:0] typ, logic [3:0] func,
                                      logic [SLOT_AW-1:0] in0, logic [SLOT_AW-1:0] in1,
                                      logic [SLOT_AW-1:0] out);
    instr_t i;
    i.typ  = typ;
    i.func = func;
    i.in0  = in0;
    i.in1  = in1;
    i.out  = out;
    return i;
  endfunction

endpackage
