// Asynchronous AVR core: four stages (instruction fetch, decode, execute,
// write back) without a clock.
//
// Each instruction is started by a four-phase handshake on req/ack. The stage
// controllers Q1..Q4 (avr_control) then run one handshake per stage, strictly
// in order; inside fetch, Q1_1..Q1_3 run the three fetch steps. Every stage
// moves data between dual-rail registers, and every acknowledge is derived
// from the arrival of complete dual-rail data, so the core is correct whatever
// the delays of its gates and wires.
//
// External interface:
//   clr            clears all registers (PC = NPC = 0, R0..R31 = 0, SREG = 0)
//   req / ack      one four-phase handshake per instruction
//   addr_t/f       program address, dual-rail, valid during the fetch step and
//                  at the spacer otherwise
//   instr_t/f      the 16-bit instruction word returned, dual-rail; it must
//                  return to the spacer after the address does
//   r31            contents of R31; r31_out its complemented output register
//   sreg           status register
//   wb_bypass      high while the write-back step is skipped
//
// Origin: the four stages, the Q-element sequencing, the register names (PC, NPC, INC,
// NEXTPC, IR, OPCODE, DST INDEX, SRC, DST, DST RESULT) and the write-back bypass follow the
// original asynchronous AVR design. Placing SREG in the execution stage with a captured
// copy, and the write flag that selects the bypass, are this design's own choices.
//
// Tool notes: The stage handshakes close loops through the Q elements and latches; lint tools report
// them as circular combinational logic. They are the clockless control itself.
module async_avr
  import avr_pkg::*;
(
  input  logic            clr,
  input  logic            req,
  output logic            ack,
  output logic [PC_W-1:0] addr_t, addr_f,
  input  logic [15:0]     instr_t, instr_f,
  output logic [7:0]      r31,
  output logic [7:0]      r31_out,
  output logic [7:0]      sreg,
  output logic            wb_bypass
);
  logic [3:0] lo, li;

  avr_control u_ctl (.clr(clr), .req(req), .ack(ack), .lo(lo), .li(li));

  // fetch
  logic            fetch_req, fetch_ack, br_req, br_ack;
  logic [PC_W-1:0] br_t, br_f;

  if_stage u_if (
    .clr(clr), .q1_lo(lo[0]), .q1_li(li[0]), .addr_t(addr_t), .addr_f(addr_f),
    .fetch_req(fetch_req), .fetch_ack(fetch_ack),
    .br_req(br_req), .br_t(br_t), .br_f(br_f), .br_ack(br_ack));

  // decode
  logic [4:0] ra_t, ra_f, rb_t, rb_f;
  logic [7:0] rda_t, rda_f, rdb_t, rdb_f;
  logic [4:0] op_t, op_f, di_t, di_f;
  logic [7:0] src_t, src_f, dst_t, dst_f;
  logic       ex_ack;

  id_stage u_id (
    .clr(clr), .fetch_req(fetch_req), .fetch_ack(fetch_ack),
    .instr_t(instr_t), .instr_f(instr_f), .pc_t(addr_t), .pc_f(addr_f),
    .q2_lo(lo[1]), .q2_li(li[1]),
    .ra_t(ra_t), .ra_f(ra_f), .rda_t(rda_t), .rda_f(rda_f),
    .rb_t(rb_t), .rb_f(rb_f), .rdb_t(rdb_t), .rdb_f(rdb_f),
    .op_t(op_t), .op_f(op_f), .di_t(di_t), .di_f(di_f),
    .src_t(src_t), .src_f(src_f), .dst_t(dst_t), .dst_f(dst_f), .ex_ack(ex_ack));

  // execute
  logic [4:0] wi_t, wi_f;
  logic [7:0] wd_t, wd_f;
  logic       ww_t, ww_f, wb_ack;

  ex_stage u_ex (
    .clr(clr), .q2_lo(lo[1]), .ex_ack(ex_ack),
    .op_t(op_t), .op_f(op_f), .di_t(di_t), .di_f(di_f),
    .src_t(src_t), .src_f(src_f), .dst_t(dst_t), .dst_f(dst_f),
    .q3_lo(lo[2]), .q3_li(li[2]),
    .wi_t(wi_t), .wi_f(wi_f), .wd_t(wd_t), .wd_f(wd_f), .ww_t(ww_t), .ww_f(ww_f),
    .wb_ack(wb_ack), .br_req(br_req), .br_t(br_t), .br_f(br_f), .br_ack(br_ack),
    .sreg(sreg));

  // write back
  logic       wreq, wack;
  logic [4:0] wa_t, wa_f;
  logic [7:0] rw_t, rw_f;

  wb_stage u_wb (
    .clr(clr), .q3_lo(lo[2]), .wb_ack(wb_ack),
    .wi_t(wi_t), .wi_f(wi_f), .wd_t(wd_t), .wd_f(wd_f), .ww_t(ww_t), .ww_f(ww_f),
    .q4_lo(lo[3]), .q4_li(li[3]), .wreq(wreq), .wa_t(wa_t), .wa_f(wa_f),
    .rw_t(rw_t), .rw_f(rw_f), .wack(wack), .bypass(wb_bypass));

  // register file
  regfile u_rf (
    .clr(clr), .ra_t(ra_t), .ra_f(ra_f), .rda_t(rda_t), .rda_f(rda_f),
    .rb_t(rb_t), .rb_f(rb_f), .rdb_t(rdb_t), .rdb_f(rdb_f),
    .wreq(wreq), .wa_t(wa_t), .wa_f(wa_f), .wd_t(rw_t), .wd_f(rw_f), .wack(wack),
    .r31(r31), .r31_out(r31_out));
endmodule
