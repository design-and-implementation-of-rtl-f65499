// Arithmetic logic unit of the execution stage (combinational).
//
// Operands: a is the DST field (Rd, or the instruction address for branches),
// b the SRC field (Rr, an immediate, or a branch offset). sreg_in is the status
// register as read when the instruction was decoded; sbit selects an SREG bit
// for BSET/BCLR/BRBS/BRBC.
// Outputs: result for the write-back stage with wr saying whether Rd is
// written; sreg_out, the status register after the instruction (flag rules of
// the AVR instruction set); br_taken with target = a + b + 1 for RJMP and taken
// conditional branches. A taken branch writes no register: its result goes to
// the NPC register and the write-back step is skipped.
//
// Interface: uop, a, b, sreg_in, sbit in; result, wr, sreg_out, br_taken, target out.
// Timing: purely combinational; the execution stage presents its outputs only
// when all operand fields are complete.
//
// Origin: the instruction list follows the original design; the flag rules are those of
// the AVR instruction set. Grouping into micro-operations and the 8-bit wrap of branch
// targets are this design's own choices.
module avr_alu
  import avr_pkg::*;
(
  input  uop_e        uop,
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  input  logic [7:0]  sreg_in,
  input  logic [2:0]  sbit,
  output logic [7:0]  result,
  output logic        wr,
  output logic [7:0]  sreg_out,
  output logic        br_taken,
  output logic [7:0]  target
);
  logic [7:0] r;
  logic       cin;
  logic       h, v, c, n, z;

  assign target = a + b + 8'd1;

  always_comb begin
    r        = a;
    sreg_out = sreg_in;
    wr       = 1'b0;
    br_taken = 1'b0;
    cin      = 1'b0;
    h = 1'b0; v = 1'b0; c = 1'b0;

    unique case (uop)
      UOP_ADD, UOP_ADC: begin
        cin = (uop == UOP_ADC) ? sreg_in[SREG_C] : 1'b0;
        r   = a + b + {7'd0, cin};
        h   = (a[3] & b[3]) | (b[3] & ~r[3]) | (~r[3] & a[3]);
        v   = (a[7] & b[7] & ~r[7]) | (~a[7] & ~b[7] & r[7]);
        c   = (a[7] & b[7]) | (b[7] & ~r[7]) | (~r[7] & a[7]);
        wr  = 1'b1;
      end
      UOP_SUB, UOP_SBC, UOP_CP, UOP_CPC: begin
        cin = (uop == UOP_SBC || uop == UOP_CPC) ? sreg_in[SREG_C] : 1'b0;
        r   = a - b - {7'd0, cin};
        h   = (~a[3] & b[3]) | (b[3] & r[3]) | (r[3] & ~a[3]);
        v   = (a[7] & ~b[7] & ~r[7]) | (~a[7] & b[7] & r[7]);
        c   = (~a[7] & b[7]) | (b[7] & r[7]) | (r[7] & ~a[7]);
        wr  = (uop == UOP_SUB || uop == UOP_SBC);
      end
      UOP_AND: begin r = a & b; wr = 1'b1; end
      UOP_OR:  begin r = a | b; wr = 1'b1; end
      UOP_EOR: begin r = a ^ b; wr = 1'b1; end
      UOP_COM: begin r = ~a; c = 1'b1; wr = 1'b1; end
      UOP_NEG: begin
        r  = 8'd0 - a;
        h  = r[3] | a[3];
        v  = (r == 8'h80);
        c  = (r != 8'h00);
        wr = 1'b1;
      end
      UOP_INC: begin r = a + 8'd1; v = (r == 8'h80); wr = 1'b1; end
      UOP_DEC: begin r = a - 8'd1; v = (r == 8'h7f); wr = 1'b1; end
      UOP_MOV: begin r = b; wr = 1'b1; end
      UOP_BSET: sreg_out[sbit] = 1'b1;
      UOP_BCLR: sreg_out[sbit] = 1'b0;
      UOP_RJMP: br_taken = 1'b1;
      UOP_BRBS: br_taken = sreg_in[sbit];
      UOP_BRBC: br_taken = ~sreg_in[sbit];
      default: ;
    endcase

    n = r[7];
    z = (r == 8'h00);

    // flag updates per instruction class
    unique case (uop)
      UOP_ADD, UOP_ADC, UOP_SUB, UOP_CP, UOP_NEG: begin
        sreg_out[SREG_H] = h;
        sreg_out[SREG_V] = v;
        sreg_out[SREG_N] = n;
        sreg_out[SREG_Z] = z;
        sreg_out[SREG_C] = c;
        sreg_out[SREG_S] = n ^ v;
      end
      UOP_SBC, UOP_CPC: begin
        sreg_out[SREG_H] = h;
        sreg_out[SREG_V] = v;
        sreg_out[SREG_N] = n;
        sreg_out[SREG_Z] = z & sreg_in[SREG_Z];
        sreg_out[SREG_C] = c;
        sreg_out[SREG_S] = n ^ v;
      end
      UOP_AND, UOP_OR, UOP_EOR: begin
        sreg_out[SREG_V] = 1'b0;
        sreg_out[SREG_N] = n;
        sreg_out[SREG_Z] = z;
        sreg_out[SREG_S] = n;
      end
      UOP_COM: begin
        sreg_out[SREG_V] = 1'b0;
        sreg_out[SREG_N] = n;
        sreg_out[SREG_Z] = z;
        sreg_out[SREG_C] = 1'b1;
        sreg_out[SREG_S] = n;
      end
      UOP_INC, UOP_DEC: begin
        sreg_out[SREG_V] = v;
        sreg_out[SREG_N] = n;
        sreg_out[SREG_Z] = z;
        sreg_out[SREG_S] = n ^ v;
      end
      default: ;
    endcase

    result = r;
  end
endmodule
