// ese150_top: the lecture's hardware side by side. Each part has its own ports:
//   og_*  : the one-gate stored-program processor (1-bit slots, one programmable gate);
//   wp_*  : the word-wide stored-program processor (W-bit slots, ALU, branch);
//   pg_*  : a stand-alone programmable gate whose truth table sits in flip-flops;
//   p1_*  : the example function o1 = majority(a,b,c), o2 = a^b^c built from fixed gates,
//           the same function the one-gate processor's example program computes;
//   ff_*  : a flip-flop built from two multiplexer latches, clocked by ff_clk.
// The parts share clk and rst_n (except the mux flip-flop) and nothing else. Timing of
// each part is given in its own module.
module ese150_top
  import spp_pkg::*;
#(
  parameter int unsigned PC_W = 4,
  parameter int unsigned W    = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // one-gate processor
  input  logic               og_run,
  input  logic               og_prog_we,
  input  logic [PC_W-1:0]    og_prog_addr,
  input  logic [INSTR_W-1:0] og_prog_data,
  input  logic [7:0]         og_in,
  output logic [7:0]         og_out,
  output logic [PC_W-1:0]    og_pc,
  // word-wide processor
  input  logic               wp_run,
  input  logic               wp_prog_we,
  input  logic [PC_W-1:0]    wp_prog_addr,
  input  logic [INSTR_W-1:0] wp_prog_data,
  input  logic [7:0][W-1:0]  wp_in,
  output logic [7:0][W-1:0]  wp_out,
  output logic [PC_W-1:0]    wp_pc,
  // programmable gate
  input  logic               pg_cfg_we,
  input  logic [3:0]         pg_cfg_tt,
  input  logic               pg_in0,
  input  logic               pg_in1,
  output logic               pg_o,
  // fixed-gate example circuit
  input  logic               p1_a,
  input  logic               p1_b,
  input  logic               p1_c,
  output logic               p1_o1,
  output logic               p1_o2,
  // mux-latch flip-flop
  input  logic               ff_clk,
  input  logic               ff_d,
  output logic               ff_q
);
  one_gate_proc #(.PC_W(PC_W)) u_ogp (
    .clk, .rst_n, .run(og_run), .prog_we(og_prog_we), .prog_addr(og_prog_addr),
    .prog_data(og_prog_data), .in(og_in), .out(og_out), .pc(og_pc)
  );

  word_proc #(.W(W), .PC_W(PC_W)) u_wp (
    .clk, .rst_n, .run(wp_run), .prog_we(wp_prog_we), .prog_addr(wp_prog_addr),
    .prog_data(wp_prog_data), .in(wp_in), .out(wp_out), .pc(wp_pc)
  );

  prog_gate u_pg (
    .clk, .rst_n, .cfg_we(pg_cfg_we), .cfg_tt(pg_cfg_tt), .in0(pg_in0), .in1(pg_in1),
    .o(pg_o)
  );

  preclass1_gates u_p1 (.a(p1_a), .b(p1_b), .c(p1_c), .o1(p1_o1), .o2(p1_o2));

  mux_dff u_ff (.clk(ff_clk), .d(ff_d), .q(ff_q));
endmodule
