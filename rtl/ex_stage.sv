// Execution stage: the OPCODE / DST INDEX / SRC / DST latch, the ALU and the
// status register (SREG).
//
// During Q2 the latch captures the four fields from the decoder, plus a copy of
// SREG (shown by the SREG register during Q2), and answers ex_ack.
// When Q3 requests (q3_lo) the latch shows its fields; once they are complete
// the ALU result is presented, as dual-rail words, to
//   - the write-back latch (destination index, result, write flag),
//   - SREG (the updated flags),
//   - for a taken branch, the NPC register (br_req, target br_t/f).
// q3_li rises when every addressed receiver has acknowledged. For a taken
// branch (or any instruction that writes no register) the write flag is 0,
// which makes the write-back stage skip the register file.
// SREG clears to 0. Keeping the SREG copy in the latch lets the ALU read the
// old flags while SREG takes the new ones in the same step.
//
// Tool notes: SREG feeds the ALU through the captured copy and the ALU feeds SREG: the path is
// opened by the handshake (the copy is captured in Q2, SREG loads in Q3), but lint and
// synthesis see a combinational loop. The C-element that joins the acknowledges and the
// fields' held acknowledges are feedback loops by design and are reported the same way.
// The val outputs of the latch fields are unused.
module ex_stage
  import avr_pkg::*;
(
  input  logic            clr,
  // capture from decode
  input  logic            q2_lo,
  output logic            ex_ack,
  input  logic [4:0]      op_t, op_f,
  input  logic [4:0]      di_t, di_f,
  input  logic [7:0]      src_t, src_f,
  input  logic [7:0]      dst_t, dst_f,
  // Q3 handshake
  input  logic            q3_lo,
  output logic            q3_li,
  // to the write-back latch
  output logic [4:0]      wi_t, wi_f,
  output logic [7:0]      wd_t, wd_f,
  output logic            ww_t, ww_f,
  input  logic            wb_ack,
  // to NPC
  output logic            br_req,
  output logic [PC_W-1:0] br_t, br_f,
  input  logic            br_ack,
  // status register contents
  output logic [7:0]      sreg
);
  logic [4:0] lop_t, lop_f, ldi_t, ldi_f;
  logic [7:0] lsrc_t, lsrc_f, ldst_t, ldst_f, lsr_t, lsr_f;
  logic [4:0] v_op, v_di;
  logic [7:0] v_src, v_dst, v_sr;
  logic [4:0] a;
  logic [7:0] sr_q_t, sr_q_f;
  logic [7:0] nsr_t, nsr_f;
  logic       sr_ack;

  dr_reg #(.W(5)) u_op  (.clr(clr), .cap(q2_lo), .d_t(op_t),  .d_f(op_f),  .ack(a[0]),
                         .show(q3_lo), .q_t(lop_t),  .q_f(lop_f),  .val(v_op));
  dr_reg #(.W(5)) u_di  (.clr(clr), .cap(q2_lo), .d_t(di_t),  .d_f(di_f),  .ack(a[1]),
                         .show(q3_lo), .q_t(ldi_t),  .q_f(ldi_f),  .val(v_di));
  dr_reg #(.W(8)) u_src (.clr(clr), .cap(q2_lo), .d_t(src_t), .d_f(src_f), .ack(a[2]),
                         .show(q3_lo), .q_t(lsrc_t), .q_f(lsrc_f), .val(v_src));
  dr_reg #(.W(8)) u_dst (.clr(clr), .cap(q2_lo), .d_t(dst_t), .d_f(dst_f), .ack(a[3]),
                         .show(q3_lo), .q_t(ldst_t), .q_f(ldst_f), .val(v_dst));
  dr_reg #(.W(8)) u_srs (.clr(clr), .cap(q2_lo), .d_t(sr_q_t), .d_f(sr_q_f), .ack(a[4]),
                         .show(q3_lo), .q_t(lsr_t),  .q_f(lsr_f),  .val(v_sr));

  // SREG: shown during decode, loaded during execute
  dr_reg #(.W(8)) u_sreg (.clr(clr), .cap(q3_lo), .d_t(nsr_t), .d_f(nsr_f), .ack(sr_ack),
                          .show(q2_lo), .q_t(sr_q_t), .q_f(sr_q_f), .val(sreg));

  // join of the five acknowledges: rises when all are high, falls when all are low
  c_element u_xack (.clr(clr), .a(&a), .b(|a), .y(ex_ack));

  // ALU on complete operands
  logic in_ok;
  assign in_ok = (&(lop_t ^ lop_f)) & (&(ldi_t ^ ldi_f)) & (&(lsrc_t ^ lsrc_f))
               & (&(ldst_t ^ ldst_f)) & (&(lsr_t ^ lsr_f));

  logic [7:0] res, sr_out, target;
  logic       wr, taken;

  avr_alu u_alu (
    .uop(uop_e'(lop_t)), .a(ldst_t), .b(lsrc_t), .sreg_in(lsr_t), .sbit(ldi_t[2:0]),
    .result(res), .wr(wr), .sreg_out(sr_out), .br_taken(taken), .target(target));

  assign wi_t  = in_ok ? ldi_t  : '0;
  assign wi_f  = in_ok ? ~ldi_t : '0;
  assign wd_t  = in_ok ? res  : '0;
  assign wd_f  = in_ok ? ~res : '0;
  assign ww_t  = in_ok & wr;
  assign ww_f  = in_ok & ~wr;
  assign nsr_t = in_ok ? sr_out  : '0;
  assign nsr_f = in_ok ? ~sr_out : '0;

  assign br_req = q3_lo & in_ok & taken;
  assign br_t   = br_req ? PC_W'(target)  : '0;
  assign br_f   = br_req ? ~PC_W'(target) : '0;

  // join of the receivers' acknowledges
  assign q3_li = wb_ack & sr_ack & (~taken | br_ack);
endmodule
