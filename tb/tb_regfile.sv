// Testbench of the register file: random four-phase write handshakes (index
// and data arriving as dual-rail words) and dual-rail reads on both ports,
// compared with a model array; checks that a write waits for complete data,
// that reads return to the spacer, and the R31 outputs (contents and the
// complemented output register, 00 after clear).
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_regfile;
  logic       clr, wreq, wack;
  logic [4:0] ra_t, ra_f, rb_t, rb_f, wa_t, wa_f;
  logic [7:0] rda_t, rda_f, rdb_t, rdb_f, wd_t, wd_f, r31, r31_out;
  logic [7:0] model [32];
  logic [7:0] out_model;
  int checks = 0, failures = 0;

  regfile dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic write(input logic [4:0] a, input logic [7:0] d);
    wreq = 1; wa_t = a; wa_f = ~a; #1;
    chk(!wack, "no ack before data");
    wd_t = d; wd_f = ~d; #1;
    chk(wack, "write ack");
    wreq = 0; #1;
    chk(!wack, "ack falls");
    wa_t = 0; wa_f = 0; wd_t = 0; wd_f = 0; #1;
    model[a] = d;
    if (a == 31) out_model = ~d;
  endtask

  task automatic read_check(input logic [4:0] a, input logic [4:0] b);
    ra_t = a; ra_f = ~a; rb_t = b; rb_f = ~b; #1;
    chk(rda_t == model[a] && rda_f == ~model[a], $sformatf("read A R%0d", a));
    chk(rdb_t == model[b] && rdb_f == ~model[b], $sformatf("read B R%0d", b));
    ra_t = 0; ra_f = 0; rb_t = 0; rb_f = 0; #1;
    chk(rda_t == 0 && rda_f == 0 && rdb_t == 0 && rdb_f == 0, "read spacer");
  endtask

  initial begin
    clr = 1; wreq = 0; {ra_t, ra_f, rb_t, rb_f, wa_t, wa_f, wd_t, wd_f} = '0; #2; clr = 0; #1;
    for (int i = 0; i < 32; i++) model[i] = 0;
    out_model = 8'h00;
    chk(r31_out == 8'h00, "R31 output 00 after clear");
    for (int i = 0; i < 32; i++) read_check(5'(i), 5'(31 - i));
    for (int n = 0; n < 500; n++) begin
      write(5'($urandom), 8'($urandom));
      if (n % 5 == 0) write(5'd31, 8'($urandom));
      read_check(5'($urandom), 5'($urandom));
      chk(r31 == model[31] && r31_out == out_model, "R31 outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
