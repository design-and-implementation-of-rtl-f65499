// Testbench of the ALU. For every micro-operation and random operands and
// status register, the ALU outputs are compared with the instruction-level
// reference model, fed with the matching AVR instruction word (Rd = R1,
// Rr = R2, or the branch operands).
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_avr_alu;
  import avr_pkg::*;
  import avr_ref_pkg::*;
  uop_e       uop;
  logic [7:0] a, b, sreg_in, result, sreg_out, target;
  logic [2:0] sbit;
  logic       wr, br_taken;
  int checks = 0, failures = 0;

  avr_alu dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    avr_state_t s;
    logic [15:0] w;
    int kind;
    for (int n = 0; n < 4000; n++) begin
      uop     = uop_e'($urandom_range(0, 19));
      a       = 8'($urandom);
      b       = 8'($urandom);
      sreg_in = 8'($urandom);
      sbit    = 3'($urandom);
      if (n % 7 == 0) b = a;          // equal operands: zero results
      ref_reset(s);
      s.sreg = sreg_in;
      s.r[1] = a;
      s.r[2] = b;
      s.pc   = a;
      unique case (uop)
        UOP_ADD:  w = 16'h0C12;  UOP_ADC: w = 16'h1C12;
        UOP_SUB:  w = 16'h1812;  UOP_SBC: w = 16'h0812;
        UOP_AND:  w = 16'h2012;  UOP_OR:  w = 16'h2812;
        UOP_EOR:  w = 16'h2412;  UOP_MOV: w = 16'h2C12;
        UOP_CP:   w = 16'h1412;  UOP_CPC: w = 16'h0412;
        UOP_COM:  w = 16'h9410;  UOP_NEG: w = 16'h9411;
        UOP_INC:  w = 16'h9413;  UOP_DEC: w = 16'h941A;
        UOP_BSET: w = {9'b100101000, sbit, 4'b1000};
        UOP_BCLR: w = {9'b100101001, sbit, 4'b1000};
        UOP_RJMP: w = {8'hC0, b};
        UOP_BRBS: begin b = {b[6], b[6:0]}; w = {6'b111100, b[6:0], sbit}; end
        UOP_BRBC: begin b = {b[6], b[6:0]}; w = {6'b111101, b[6:0], sbit}; end
        default:  w = 16'h0000;
      endcase
      #1;
      kind = ref_step(s, w);
      chk(wr == (kind == 0), $sformatf("%s write flag", uop.name()));
      if (kind == 0) chk(result == s.r[1], $sformatf("%s %h,%h result %h exp %h", uop.name(), a, b, result, s.r[1]));
      chk(sreg_out == s.sreg, $sformatf("%s %h,%h sreg %b exp %b (in %b)", uop.name(), a, b, sreg_out, s.sreg, sreg_in));
      chk(br_taken == (kind == 1), $sformatf("%s taken", uop.name()));
      if (kind == 1) chk(target == s.pc, $sformatf("%s target %h exp %h", uop.name(), target, s.pc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
