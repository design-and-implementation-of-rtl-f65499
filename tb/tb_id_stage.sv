// Testbench of the instruction decode stage. A register file stand-in answers
// dual-rail reads from a model array. For random instructions of several forms
// the stage runs its fetch capture and its Q2 handshake; the four fields sent
// to the execution latch (OPCODE, DST INDEX, SRC, DST) are compared with values
// worked out from the instruction encoding, and must return to the spacer
// after the handshake.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_id_stage;
  import avr_pkg::*;
  logic        clr, fetch_req, fetch_ack, q2_lo, q2_li, ex_ack;
  logic [15:0] instr_t, instr_f;
  logic [7:0]  pc_t, pc_f;
  logic [4:0]  ra_t, ra_f, rb_t, rb_f, op_t, op_f, di_t, di_f;
  logic [7:0]  rda_t, rda_f, rdb_t, rdb_f, src_t, src_f, dst_t, dst_f;
  logic [7:0]  rf [32];
  int checks = 0, failures = 0;

  id_stage dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // register file stand-in
  always_comb begin
    rda_t = (&(ra_t ^ ra_f)) ? rf[ra_t] : '0;
    rda_f = (&(ra_t ^ ra_f)) ? ~rf[ra_t] : '0;
    rdb_t = (&(rb_t ^ rb_f)) ? rf[rb_t] : '0;
    rdb_f = (&(rb_t ^ rb_f)) ? ~rf[rb_t] : '0;
  end

  // execution latch stand-in
  assign ex_ack = q2_lo & (&(op_t ^ op_f)) & (&(di_t ^ di_f)) & (&(src_t ^ src_f)) & (&(dst_t ^ dst_f));

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input logic [15:0] w, input logic [7:0] pc,
                     input uop_e eop, input logic [4:0] edi, input logic [7:0] esrc, input logic [7:0] edst);
    int t;
    fetch_req = 1; #1;
    instr_t = w; instr_f = ~w; pc_t = pc; pc_f = ~pc; #1;
    chk(fetch_ack, "fetch captured");
    fetch_req = 0; #1;
    instr_t = 0; instr_f = 0; pc_t = 0; pc_f = 0; #1;
    chk(!fetch_ack, "fetch ack falls");
    chk(op_t == 0 && src_t == 0 && dst_t == 0, "fields at spacer before Q2");
    q2_lo = 1; #1;
    chk(q2_li, "Q2 acknowledged");
    chk(op_t == eop && op_f == ~eop, $sformatf("%h opcode %0d exp %0d", w, op_t, eop));
    chk(di_t == edi, $sformatf("%h dst index %0d exp %0d", w, di_t, edi));
    chk(src_t == esrc && src_f == ~esrc, $sformatf("%h SRC %h exp %h", w, src_t, esrc));
    chk(dst_t == edst && dst_f == ~edst, $sformatf("%h DST %h exp %h", w, dst_t, edst));
    q2_lo = 0; #1;
    chk(!q2_li && op_t == 0 && op_f == 0 && src_t == 0 && src_f == 0 && ra_t == 0 && ra_f == 0,
        "spacer after Q2");
  endtask

  initial begin
    logic [4:0] d, r; logic [7:0] k, pc; logic [11:0] k12;
    clr = 1; fetch_req = 0; q2_lo = 0; {instr_t, instr_f, pc_t, pc_f} = '0; #2; clr = 0; #1;
    for (int i = 0; i < 32; i++) rf[i] = 8'($urandom);
    for (int n = 0; n < 200; n++) begin
      d = 5'($urandom); r = 5'($urandom); k = 8'($urandom); pc = 8'($urandom); k12 = 12'($urandom);
      run({6'b000011, r[4], d, r[3:0]}, pc, UOP_ADD, d, rf[r], rf[d]);
      run({6'b000110, r[4], d, r[3:0]}, pc, UOP_SUB, d, rf[r], rf[d]);
      run({6'b001011, r[4], d, r[3:0]}, pc, UOP_MOV, d, rf[r], rf[d]);
      run({4'hE, k[7:4], d[3:0], k[3:0]}, pc, UOP_MOV, {1'b1, d[3:0]}, k, rf[{1'b1, d[3:0]}]);
      run({4'h5, k[7:4], d[3:0], k[3:0]}, pc, UOP_SUB, {1'b1, d[3:0]}, k, rf[{1'b1, d[3:0]}]);
      run({4'hC, k12}, pc, UOP_RJMP, k12[8:4], k12[7:0], pc);
      run({6'b111101, k[6:0], r[2:0]}, pc, UOP_BRBC, {2'b00, r[2:0]},
          {k[6], k[6:0]}, pc);
      rf[$urandom_range(0, 31)] = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
