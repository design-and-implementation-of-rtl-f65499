// Testbench of the instruction decoder. Random words of every implemented
// instruction form are decoded and the micro-operation and operand fields are
// compared with values worked out here from the AVR encoding tables; words
// outside the subset must decode to NOP.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_avr_decoder;
  import avr_pkg::*;
  logic [15:0] instr;
  uop_e        uop;
  logic [4:0]  dst_idx, src_idx;
  logic [7:0]  imm;
  logic        src_imm, dst_pc;
  int checks = 0, failures = 0;

  avr_decoder dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (word %h)", s, instr); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic two_reg(input logic [5:0] top6, input uop_e u);
    logic [15:0] w;
    w = {top6, 10'($urandom)};
    instr = w; #1;
    chk(uop == u, $sformatf("two-register uop %s got %s", u.name(), uop.name()));
    chk(dst_idx == w[8:4] && src_idx == {w[9], w[3:0]}, "d/r fields");
    chk(!src_imm && !dst_pc, "register operands");
  endtask

  task automatic imm_op(input logic [3:0] top4, input uop_e u);
    logic [15:0] w;
    w = {top4, 12'($urandom)};
    instr = w; #1;
    chk(uop == u, $sformatf("immediate uop %s got %s", u.name(), uop.name()));
    chk(dst_idx == (5'd16 + 5'(w[7:4])), "d = 16..31");
    chk(imm == {w[11:8], w[3:0]} && src_imm && !dst_pc, "K field");
  endtask

  initial begin
    for (int n = 0; n < 50; n++) begin
      two_reg(6'b000011, UOP_ADD);  two_reg(6'b000111, UOP_ADC);
      two_reg(6'b000110, UOP_SUB);  two_reg(6'b000010, UOP_SBC);
      two_reg(6'b001000, UOP_AND);  two_reg(6'b001010, UOP_OR);
      two_reg(6'b001001, UOP_EOR);  two_reg(6'b001011, UOP_MOV);
      two_reg(6'b000101, UOP_CP);   two_reg(6'b000001, UOP_CPC);
      imm_op(4'h3, UOP_CP);  imm_op(4'h4, UOP_SBC); imm_op(4'h5, UOP_SUB);
      imm_op(4'h6, UOP_OR);  imm_op(4'h7, UOP_AND); imm_op(4'hE, UOP_MOV);
      begin
        logic [4:0] d; logic [2:0] s; logic [11:0] k; logic [6:0] k7;
        d = 5'($urandom); s = 3'($urandom); k = 12'($urandom); k7 = 7'($urandom);
        instr = {7'b1001010, d, 4'b0000}; #1; chk(uop == UOP_COM && dst_idx == d, "COM");
        instr = {7'b1001010, d, 4'b0001}; #1; chk(uop == UOP_NEG && dst_idx == d, "NEG");
        instr = {7'b1001010, d, 4'b0011}; #1; chk(uop == UOP_INC && dst_idx == d, "INC");
        instr = {7'b1001010, d, 4'b1010}; #1; chk(uop == UOP_DEC && dst_idx == d, "DEC");
        instr = {9'b100101000, s, 4'b1000}; #1; chk(uop == UOP_BSET && dst_idx[2:0] == s, "BSET");
        instr = {9'b100101001, s, 4'b1000}; #1; chk(uop == UOP_BCLR && dst_idx[2:0] == s, "BCLR");
        instr = {4'hC, k}; #1;
        chk(uop == UOP_RJMP && imm == k[7:0] && src_imm && dst_pc, "RJMP");
        instr = {6'b111100, k7, s}; #1;
        chk(uop == UOP_BRBS && imm == {k7[6], k7} && dst_idx[2:0] == s && dst_pc, "BRBS");
        instr = {6'b111101, k7, s}; #1;
        chk(uop == UOP_BRBC && imm == {k7[6], k7} && dst_idx[2:0] == s && dst_pc, "BRBC");
      end
    end
    // the looping addition program
    instr = 16'hE0F0; #1; chk(uop == UOP_MOV && dst_idx == 31 && imm == 0, "LDI R31,0");
    instr = 16'hE0E1; #1; chk(uop == UOP_MOV && dst_idx == 30 && imm == 1, "LDI R30,1");
    instr = 16'h0FFE; #1; chk(uop == UOP_ADD && dst_idx == 31 && src_idx == 30, "ADD R31,R30");
    instr = 16'hCFFE; #1; chk(uop == UOP_RJMP && imm == 8'hFE, "jump back by 2");
    // outside the subset: NOP
    instr = 16'h0000; #1; chk(uop == UOP_NOP, "NOP");
    instr = 16'h1000; #1; chk(uop == UOP_NOP, "CPSE not implemented");
    instr = 16'h8000; #1; chk(uop == UOP_NOP, "LD not implemented");
    instr = 16'hF800; #1; chk(uop == UOP_NOP, "BLD not implemented");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
