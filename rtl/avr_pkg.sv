// Shared types and constants of the asynchronous AVR core.
//
// Data between the core's registers travels dual-rail: every bit is a pair
// (t, f). (0,0) is the spacer (no data), (1,0) a valid one, (0,1) a valid zero.
// A word is complete when every bit has exactly one rail high. The helper
// functions below build and test such words; the core only acts on a word once
// it is complete, which is what makes each hand-over independent of wire delay.
//
// The micro-instruction index (uop_e) is the "opcode" field that the decoder
// hands to the execution stage. Its encoding is a choice of this design. The
// status register bit positions follow the AVR architecture (C Z N V S H T I).
package avr_pkg;

  // Program counter width: the NPC and PC registers are eight bits wide.
  localparam int unsigned PC_W = 8;

  // Micro-instruction index carried from decode to execute.
  typedef enum logic [4:0] {
    UOP_NOP  = 5'd0,
    UOP_ADD  = 5'd1,   // ADD
    UOP_ADC  = 5'd2,   // ADC
    UOP_SUB  = 5'd3,   // SUB, SUBI
    UOP_SBC  = 5'd4,   // SBC, SBCI
    UOP_AND  = 5'd5,   // AND, ANDI, CBR, TST
    UOP_OR   = 5'd6,   // OR, ORI, SBR
    UOP_EOR  = 5'd7,   // EOR, CLR
    UOP_COM  = 5'd8,
    UOP_NEG  = 5'd9,
    UOP_INC  = 5'd10,
    UOP_DEC  = 5'd11,
    UOP_MOV  = 5'd12,  // MOV, LDI, SER: result is the source operand
    UOP_CP   = 5'd13,  // CP, CPI: subtract, flags only
    UOP_CPC  = 5'd14,  // CPC: subtract with carry, flags only
    UOP_BSET = 5'd15,  // SEC..SEI, SET, SEH ...
    UOP_BCLR = 5'd16,  // CLC..CLI, CLT, CLH ...
    UOP_RJMP = 5'd17,  // RJMP (and the one-word jump of the test program)
    UOP_BRBS = 5'd18,  // BRBS and its aliases (BREQ, BRCS, BRLO, ...)
    UOP_BRBC = 5'd19   // BRBC and its aliases (BRNE, BRCC, BRSH, ...)
  } uop_e;

  // SREG bit positions.
  localparam int unsigned SREG_C = 0;
  localparam int unsigned SREG_Z = 1;
  localparam int unsigned SREG_N = 2;
  localparam int unsigned SREG_V = 3;
  localparam int unsigned SREG_S = 4;
  localparam int unsigned SREG_H = 5;
  localparam int unsigned SREG_T = 6;
  localparam int unsigned SREG_I = 7;

  // Dual-rail helpers on packed vectors of the true rails (t) and false rails (f).
  function automatic logic dr_complete8(input logic [7:0] t, input logic [7:0] f);
    return &(t ^ f);
  endfunction

  function automatic logic dr_spacer8(input logic [7:0] t, input logic [7:0] f);
    return ~|(t | f);
  endfunction

endpackage
