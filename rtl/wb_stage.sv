// Write-back stage: the DST INDEX / DST RESULT latch and the register file
// write handshake.
//
// During Q3 the latch captures the destination index, the result and a write
// flag from the execution stage (wb_ack). When Q4 requests (q4_lo) the latch
// shows them. If the flag is 1 the register file is asked to write (wreq) and
// its acknowledge ends the step. If the flag is 0 (taken branch, compare, flag
// or no operation) the register file is left alone and the step is
// acknowledged at once: the write-back is bypassed. bypass marks that case.
//
// Origin: the DST INDEX / DST RESULT latch and the bypass follow the original design; the
// extra write-flag field that selects the bypass is this design's own choice.
//
// Tool notes: The latch fields are level-sensitive latches; their val outputs are unused here.
// The acknowledges of the fields are joined by a C-element, whose output feeds back into
// itself; lint tools report that feedback (and the fields' held acknowledges) as circular
// logic. It is the intended join and settles on every phase.
module wb_stage (
  input  logic       clr,
  input  logic       q3_lo,
  output logic       wb_ack,
  input  logic [4:0] wi_t, wi_f,
  input  logic [7:0] wd_t, wd_f,
  input  logic       ww_t, ww_f,
  input  logic       q4_lo,
  output logic       q4_li,
  output logic       wreq,
  output logic [4:0] wa_t, wa_f,
  output logic [7:0] rw_t, rw_f,
  input  logic       wack,
  output logic       bypass
);
  logic [2:0] a;
  logic [4:0] v_i;
  logic [7:0] v_d;
  logic       v_w, lw_t, lw_f;

  dr_reg #(.W(5)) u_idx (.clr(clr), .cap(q3_lo), .d_t(wi_t), .d_f(wi_f), .ack(a[0]),
                         .show(q4_lo), .q_t(wa_t), .q_f(wa_f), .val(v_i));
  dr_reg #(.W(8)) u_res (.clr(clr), .cap(q3_lo), .d_t(wd_t), .d_f(wd_f), .ack(a[1]),
                         .show(q4_lo), .q_t(rw_t), .q_f(rw_f), .val(v_d));
  dr_reg #(.W(1)) u_wr  (.clr(clr), .cap(q3_lo), .d_t(ww_t), .d_f(ww_f), .ack(a[2]),
                         .show(q4_lo), .q_t(lw_t), .q_f(lw_f), .val(v_w));

  // join of the three acknowledges: rises when all are high, falls when all are low
  c_element u_wack (.clr(clr), .a(&a), .b(|a), .y(wb_ack));
  assign wreq   = lw_t;
  assign bypass = lw_f;
  assign q4_li  = (lw_t & wack) | lw_f;
endmodule
