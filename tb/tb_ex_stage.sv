// Testbench of the execution stage. The testbench plays the decode stage (Q2
// capture of OPCODE / DST INDEX / SRC / DST), the write-back latch and the NPC
// register (both acknowledge complete dual-rail words). Random operations run
// back to back, so the status register inside the stage carries flags from one
// operation to the next; result, write flag, branch request, target and the
// new SREG are compared with the instruction-level reference model.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_ex_stage;
  import avr_pkg::*;
  import avr_ref_pkg::*;
  logic            clr, q2_lo, ex_ack, q3_lo, q3_li, wb_ack, br_req, br_ack, ww_t, ww_f;
  logic [4:0]      op_t, op_f, di_t, di_f, wi_t, wi_f;
  logic [7:0]      src_t, src_f, dst_t, dst_f, wd_t, wd_f, sreg;
  logic [PC_W-1:0] br_t, br_f;
  int checks = 0, failures = 0;

  ex_stage dut (.*);

  assign wb_ack = (&(wi_t ^ wi_f)) & (&(wd_t ^ wd_f)) & (ww_t ^ ww_f);
  assign br_ack = br_req & (&(br_t ^ br_f));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    avr_state_t s;
    logic [15:0] w;
    logic [7:0] a, b;
    logic [2:0] sbit;
    logic [4:0] di;
    uop_e uop;
    int kind;
    clr = 1; q2_lo = 0; q3_lo = 0;
    {op_t, op_f, di_t, di_f, src_t, src_f, dst_t, dst_f} = '0;
    #2; clr = 0; #1;
    ref_reset(s);
    chk(sreg == 8'h00, "SREG clears to 0");
    for (int n = 0; n < 3000; n++) begin
      uop  = uop_e'($urandom_range(1, 19));
      a    = 8'($urandom);
      b    = 8'($urandom);
      sbit = 3'($urandom);
      if (n % 7 == 0) b = a;
      s.r[1] = a; s.r[2] = b; s.pc = a;
      di = 5'd1;
      unique case (uop)
        UOP_ADD:  w = 16'h0C12;  UOP_ADC: w = 16'h1C12;
        UOP_SUB:  w = 16'h1812;  UOP_SBC: w = 16'h0812;
        UOP_AND:  w = 16'h2012;  UOP_OR:  w = 16'h2812;
        UOP_EOR:  w = 16'h2412;  UOP_MOV: w = 16'h2C12;
        UOP_CP:   w = 16'h1412;  UOP_CPC: w = 16'h0412;
        UOP_COM:  w = 16'h9410;  UOP_NEG: w = 16'h9411;
        UOP_INC:  w = 16'h9413;  UOP_DEC: w = 16'h941A;
        UOP_BSET: begin w = {9'b100101000, sbit, 4'b1000}; di = {2'b00, sbit}; end
        UOP_BCLR: begin w = {9'b100101001, sbit, 4'b1000}; di = {2'b00, sbit}; end
        UOP_RJMP: w = {8'hC0, b};
        UOP_BRBS: begin b = {b[6], b[6:0]}; w = {6'b111100, b[6:0], sbit}; di = {2'b00, sbit}; end
        UOP_BRBC: begin b = {b[6], b[6:0]}; w = {6'b111101, b[6:0], sbit}; di = {2'b00, sbit}; end
        default:  w = 16'h0000;
      endcase
      // Q2: capture
      q2_lo = 1; #1;
      op_t = 5'(uop); op_f = ~5'(uop); di_t = di; di_f = ~di;
      src_t = b; src_f = ~b; dst_t = a; dst_f = ~a; #1;
      chk(ex_ack, "capture acknowledged");
      q2_lo = 0; #1;
      {op_t, op_f, di_t, di_f, src_t, src_f, dst_t, dst_f} = '0; #1;
      chk(!ex_ack, "capture ack falls");
      chk(wi_t == 0 && wi_f == 0 && wd_t == 0 && ww_t == 0 && ww_f == 0 && !br_req, "outputs at spacer before Q3");
      // Q3: execute
      kind = ref_step(s, w);
      q3_lo = 1; #1;
      chk(q3_li, $sformatf("%s Q3 acknowledged", uop.name()));
      chk(ww_t == (kind == 0) && ww_f == (kind != 0), $sformatf("%s write flag", uop.name()));
      chk(wi_t == di && wi_f == ~di, $sformatf("%s index", uop.name()));
      if (kind == 0) chk(wd_t == s.r[1] && wd_f == ~s.r[1],
                         $sformatf("%s %h,%h result %h exp %h", uop.name(), a, b, wd_t, s.r[1]));
      chk(br_req == (kind == 1), $sformatf("%s branch request", uop.name()));
      if (kind == 1) chk(br_t == s.pc && br_f == ~s.pc, $sformatf("%s target %h exp %h", uop.name(), br_t, s.pc));
      q3_lo = 0; #1;
      chk(!q3_li && !br_req && wi_t == 0 && wi_f == 0 && wd_t == 0 && wd_f == 0, "spacer after Q3");
      chk(sreg == s.sreg, $sformatf("%s %h,%h SREG %b exp %b", uop.name(), a, b, sreg, s.sreg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
