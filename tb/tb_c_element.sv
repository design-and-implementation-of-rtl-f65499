// Testbench of the Muller C-element: walks all input sequences, with both
// polarities of the second input, and checks follow/hold behaviour and clear
// against the truth table (00 -> 0, 11 -> 1, 01/10 -> hold).
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_c_element;
  logic clr, a, b, y, yi;
  int checks = 0, failures = 0;

  c_element #(.INV_B(1'b0)) dut  (.clr(clr), .a(a), .b(b), .y(y));
  c_element #(.INV_B(1'b1)) duti (.clr(clr), .a(a), .b(b), .y(yi));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp, expi;
    clr = 1; a = 0; b = 0; #1;
    chk(y == 0 && yi == 0, "clear");
    clr = 0; #1;
    exp = 0; expi = 0;
    for (int i = 0; i < 400; i++) begin
      a = 1'($urandom); b = 1'($urandom); #1;
      if (a == b) exp = a;
      if (a == ~b) expi = a;
      chk(y == exp, $sformatf("plain a=%b b=%b y=%b exp=%b", a, b, y, exp));
      chk(yi == expi, $sformatf("inverted a=%b b=%b y=%b exp=%b", a, b, yi, expi));
    end
    a = 1; b = 1; #1; clr = 1; #1;
    chk(y == 0, "clear overrides");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
