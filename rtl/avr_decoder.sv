// AVR instruction decoder (combinational).
//
// Takes one 16-bit instruction word and names the micro-operation and where
// its two operands come from. The execution stage receives four fields, as in
// the original design's ID/EX latch: OPCODE (uop), DST INDEX, SRC and DST. This decoder
// says how to fill them:
//   dst_idx  destination register (0..31); for BSET/BCLR/BRBS/BRBC it carries
//            the SREG bit number s in its low three bits.
//   src_imm  SRC is the immediate imm (K, or the branch offset) instead of Rr.
//   dst_pc   DST is the instruction's own address instead of Rd (branches).
// Encodings are the standard AVR ones; words outside the implemented set
// (arithmetic/logic, RJMP, compares, conditional branches, MOV, LDI, flag
// set/clear, NOP) decode to NOP.
// The one-word jump of the looping test program is written as RJMP.
//
// Interface: instr in; uop, dst_idx, src_idx, imm, src_imm, dst_pc out.
// Timing: purely combinational. The decode stage forwards its outputs only
// once the instruction word is complete, so intermediate values are never used.
//
// Origin: the four fields follow the original design; the encodings follow the
// AVR instruction set; the micro-operation grouping is this design's own.
module avr_decoder
  import avr_pkg::*;
(
  input  logic [15:0] instr,
  output uop_e        uop,
  output logic [4:0]  dst_idx,
  output logic [4:0]  src_idx,
  output logic [7:0]  imm,
  output logic        src_imm,
  output logic        dst_pc
);
  logic [4:0] d5, r5, d_hi;
  logic [7:0] k8;

  assign d5   = instr[8:4];
  assign r5   = {instr[9], instr[3:0]};
  assign d_hi = {1'b1, instr[7:4]};
  assign k8   = {instr[11:8], instr[3:0]};

  always_comb begin
    uop     = UOP_NOP;
    dst_idx = d5;
    src_idx = r5;
    imm     = k8;
    src_imm = 1'b0;
    dst_pc  = 1'b0;

    unique case (instr[15:12])
      4'b0000, 4'b0001, 4'b0010: begin
        // two-register ALU group: xxxx xxrd dddd rrrr
        case (instr[13:10])
          4'b0001: uop = UOP_CPC;
          4'b0010: uop = UOP_SBC;
          4'b0011: uop = UOP_ADD;
          4'b0101: uop = UOP_CP;
          4'b0110: uop = UOP_SUB;
          4'b0111: uop = UOP_ADC;
          4'b1000: uop = UOP_AND;
          4'b1001: uop = UOP_EOR;
          4'b1010: uop = UOP_OR;
          4'b1011: uop = UOP_MOV;
          default: uop = UOP_NOP;
        endcase
      end
      4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111, 4'b1110: begin
        // register-immediate group: xxxx KKKK dddd KKKK, d = 16..31
        dst_idx = d_hi;
        src_imm = 1'b1;
        case (instr[15:12])
          4'b0011: uop = UOP_CP;    // CPI
          4'b0100: uop = UOP_SBC;   // SBCI
          4'b0101: uop = UOP_SUB;   // SUBI
          4'b0110: uop = UOP_OR;    // ORI / SBR
          4'b0111: uop = UOP_AND;   // ANDI / CBR
          default: uop = UOP_MOV;  // LDI / SER
        endcase
      end
      4'b1001: begin
        if (instr[11:9] == 3'b010) begin
          if (instr[3:0] == 4'b1000 && instr[8] == 1'b0) begin
            // BSET / BCLR: 1001 0100 Bsss 1000
            uop     = instr[7] ? UOP_BCLR : UOP_BSET;
            dst_idx = {2'b00, instr[6:4]};
          end else begin
            case (instr[3:0])
              4'b0000: uop = UOP_COM;
              4'b0001: uop = UOP_NEG;
              4'b0011: uop = UOP_INC;
              4'b1010: uop = UOP_DEC;
              default: uop = UOP_NOP;
            endcase
          end
        end
      end
      4'b1100: begin
        // RJMP k: 1100 kkkk kkkk kkkk, PC <- PC + k + 1 (8-bit program counter)
        uop     = UOP_RJMP;
        imm     = instr[7:0];
        src_imm = 1'b1;
        dst_pc  = 1'b1;
      end
      4'b1111: begin
        // BRBS / BRBC s,k: 1111 0Bkk kkkk ksss
        if (instr[11] == 1'b0) begin
          uop     = instr[10] ? UOP_BRBC : UOP_BRBS;
          dst_idx = {2'b00, instr[2:0]};
          imm     = {instr[9], instr[9:3]};
          src_imm = 1'b1;
          dst_pc  = 1'b1;
        end
      end
      default: uop = UOP_NOP;
    endcase
  end
endmodule
