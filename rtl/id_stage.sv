// Instruction decode stage: the IR and PC latch, the decoder and the register
// file read.
//
// During the fetch step (fetch_req) the latch captures the instruction word
// returned by the program memory (dual-rail instr_t/f) together with its
// address (pc_t/f, from NPC) and answers fetch_ack.
// When Q2 requests (q2_lo) the latch shows both; the decoder works on the
// instruction once it is complete, sends the Rd and Rr indices to the register
// file and assembles the four fields of the execution latch:
//   OPCODE    micro-instruction index
//   DST INDEX destination register (or SREG bit for flag and branch ops)
//   SRC       Rr, or the immediate / branch offset
//   DST       Rd, or the instruction's address for branches
// Each field is a dual-rail word that stays at the spacer until all it depends
// on is complete. q2_li is the execution latch's acknowledge (ex_ack).
//
// Origin: the IR/PC latch, the decoder and the four-field latch follow the original
// design. Using the latched PC as DST for relative jumps is this design's own choice.
//
// Tool notes: The instruction and PC registers are latches; their val outputs are unused here.
// Inside the whole core, the field outputs are part of the Q2 handshake loop (fields ->
// execution latch acknowledge -> Q2 -> shown instruction -> fields), which lint tools
// report as circular logic; the loop is the handshake and settles on every phase. The
// C-element joining the two fetch acknowledges is a feedback loop of the same kind.
module id_stage
  import avr_pkg::*;
(
  input  logic            clr,
  // fetch step
  input  logic            fetch_req,
  output logic            fetch_ack,
  input  logic [15:0]     instr_t, instr_f,
  input  logic [PC_W-1:0] pc_t, pc_f,
  // Q2 handshake
  input  logic            q2_lo,
  output logic            q2_li,
  // register file read ports
  output logic [4:0]      ra_t, ra_f,
  input  logic [7:0]      rda_t, rda_f,
  output logic [4:0]      rb_t, rb_f,
  input  logic [7:0]      rdb_t, rdb_f,
  // fields to the execution latch
  output logic [4:0]      op_t, op_f,
  output logic [4:0]      di_t, di_f,
  output logic [7:0]      src_t, src_f,
  output logic [7:0]      dst_t, dst_f,
  input  logic            ex_ack
);
  logic [15:0]     ir_t, ir_f, ir_val;
  logic [PC_W-1:0] ipc_t, ipc_f, ipc_val;
  logic            ir_ack, ipc_ack;

  dr_reg #(.W(16)) u_ir (
    .clr(clr), .cap(fetch_req), .d_t(instr_t), .d_f(instr_f), .ack(ir_ack),
    .show(q2_lo), .q_t(ir_t), .q_f(ir_f), .val(ir_val));
  dr_reg #(.W(PC_W)) u_pc (
    .clr(clr), .cap(fetch_req), .d_t(pc_t), .d_f(pc_f), .ack(ipc_ack),
    .show(q2_lo), .q_t(ipc_t), .q_f(ipc_f), .val(ipc_val));

  // join of the two acknowledges: rises when both are high, falls when both are low
  c_element u_fack (.clr(clr), .a(ir_ack), .b(ipc_ack), .y(fetch_ack));

  // decoder
  uop_e       uop;
  logic [4:0] dst_idx, src_idx;
  logic [7:0] imm;
  logic       src_imm, dst_pc;

  avr_decoder u_dec (
    .instr(ir_t), .uop(uop), .dst_idx(dst_idx), .src_idx(src_idx), .imm(imm),
    .src_imm(src_imm), .dst_pc(dst_pc));

  logic ir_ok, pc_ok, rda_ok, rdb_ok, src_ok, dst_ok;
  assign ir_ok  = &(ir_t ^ ir_f);
  assign pc_ok  = &(ipc_t ^ ipc_f);
  assign rda_ok = &(rda_t ^ rda_f);
  assign rdb_ok = &(rdb_t ^ rdb_f);

  // register file read requests: the index fields of the instruction
  assign ra_t = ir_ok ? dst_idx  : '0;
  assign ra_f = ir_ok ? ~dst_idx : '0;
  assign rb_t = ir_ok ? src_idx  : '0;
  assign rb_f = ir_ok ? ~src_idx : '0;

  // execution latch fields
  logic [7:0] src_v, dst_v;
  assign src_v  = src_imm ? imm : rdb_t;
  assign dst_v  = dst_pc  ? 8'(ipc_t) : rda_t;
  assign src_ok = ir_ok & (src_imm | rdb_ok);
  assign dst_ok = ir_ok & (dst_pc ? pc_ok : rda_ok);

  assign op_t  = ir_ok ? uop  : '0;
  assign op_f  = ir_ok ? ~uop : '0;
  assign di_t  = ir_ok ? dst_idx  : '0;
  assign di_f  = ir_ok ? ~dst_idx : '0;
  assign src_t = src_ok ? src_v  : '0;
  assign src_f = src_ok ? ~src_v : '0;
  assign dst_t = dst_ok ? dst_v  : '0;
  assign dst_f = dst_ok ? ~dst_v : '0;

  assign q2_li = ex_ack;
endmodule
