// Instruction fetch stage: PC, NPC and INC registers, the NEXTPC adder and the
// three sub-sequencers Q1_1, Q1_2, Q1_3.
//
// A request from Q1 (q1_lo) runs three handshakes in order:
//   Q1_1  NPC shows its contents; they go out as the program address
//         (dual-rail, addr_t/f) and to the PC field of the ID latch. fetch_req
//         asks the ID latch to capture the returned instruction and the
//         address; fetch_ack ends the step.
//   Q1_2  NPC is copied into PC.
//   Q1_3  PC and INC (the constant 1) feed NEXTPC; its sum is stored in NPC.
// Then q1_li acknowledges Q1. NPC has a second input port: during the
// execution of a taken branch (br_req) it takes the branch target br_t/f from
// the ALU and answers br_ack. Both ports are merged by ORing their rails, as
// only one is ever active.
//
// PC and NPC are 8 bits and clear to 0, so the first fetch is from address 0.
// Following the thesis' block diagram, the address comes from NPC.
//
// Tool notes: The NPC -> PC -> NEXTPC -> NPC path is a loop through latches that are never open at
// the same time; lint and synthesis still report it as circular logic, as they do the
// registers' acknowledges, which hold themselves until the spacer. The val
// outputs of the PC/NPC registers are not needed here and are reported as unused.
module if_stage
  import avr_pkg::*;
(
  input  logic            clr,
  input  logic            q1_lo,
  output logic            q1_li,
  output logic [PC_W-1:0] addr_t, addr_f,
  output logic            fetch_req,
  input  logic            fetch_ack,
  input  logic            br_req,
  input  logic [PC_W-1:0] br_t, br_f,
  output logic            br_ack
);
  logic q11_lo, q11_li, q12_lo, q12_li, q13_lo, q13_li;
  logic u12, u13;

  // sub-sequencers under Q1
  q_element u_q11 (.clr(clr), .ui(q1_lo), .uo(u12),   .lo(q11_lo), .li(q11_li));
  q_element u_q12 (.clr(clr), .ui(u12),   .uo(u13),   .lo(q12_lo), .li(q12_li));
  q_element u_q13 (.clr(clr), .ui(u13),   .uo(q1_li), .lo(q13_lo), .li(q13_li));

  // NPC register
  logic [PC_W-1:0] npc_d_t, npc_d_f, npc_q_t, npc_q_f, npc_val;
  logic            npc_ack;
  dr_reg #(.W(PC_W)) u_npc (
    .clr(clr), .cap(q13_lo | br_req), .d_t(npc_d_t), .d_f(npc_d_f), .ack(npc_ack),
    .show(q11_lo | q12_lo), .q_t(npc_q_t), .q_f(npc_q_f), .val(npc_val));

  // PC register
  logic [PC_W-1:0] pc_q_t, pc_q_f, pc_val;
  logic            pc_ack;
  dr_reg #(.W(PC_W)) u_pc (
    .clr(clr), .cap(q12_lo), .d_t(npc_q_t), .d_f(npc_q_f), .ack(pc_ack),
    .show(q13_lo), .q_t(pc_q_t), .q_f(pc_q_f), .val(pc_val));

  // INC register: constant increment 1, shown with PC
  logic [PC_W-1:0] inc_t, inc_f;
  assign inc_t = q13_lo ? PC_W'(1)  : '0;
  assign inc_f = q13_lo ? ~PC_W'(1) : '0;

  // NEXTPC adder, dual-rail in and out: the sum is presented once both
  // operands are complete
  logic            add_ok;
  logic [PC_W-1:0] sum, nx_t, nx_f;
  assign add_ok = (&(pc_q_t ^ pc_q_f)) & (&(inc_t ^ inc_f));
  assign sum    = pc_q_t + inc_t;
  assign nx_t   = add_ok ? sum  : '0;
  assign nx_f   = add_ok ? ~sum : '0;

  // merge of the two NPC input ports
  assign npc_d_t = nx_t | br_t;
  assign npc_d_f = nx_f | br_f;

  // program address and fetch handshake
  assign addr_t    = q11_lo ? npc_q_t : '0;
  assign addr_f    = q11_lo ? npc_q_f : '0;
  assign fetch_req = q11_lo;
  assign q11_li    = fetch_ack;
  assign q12_li    = pc_ack;
  assign q13_li    = npc_ack & q13_lo;
  assign br_ack    = npc_ack & br_req;
endmodule
