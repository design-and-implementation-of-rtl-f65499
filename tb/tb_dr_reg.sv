// Testbench of the dual-rail register: capture handshakes with data presented
// bit by bit in random order, checks that ack waits for the whole word, that
// ack is held until the word has been withdrawn completely (spacer), that
// the stored value is shown as a valid dual-rail word only while show is high,
// that the contents survive the return to spacer, and clear.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_dr_reg;
  localparam int W = 8;
  logic clr, cap, ack, show;
  logic [W-1:0] d_t, d_f, q_t, q_f, val;
  int checks = 0, failures = 0;

  dr_reg #(.W(W), .RESET_VAL(8'h5A)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [W-1:0] v;
    int order [W];
    clr = 1; cap = 0; show = 0; d_t = 0; d_f = 0; #2;
    chk(val == 8'h5A, "reset value");
    clr = 0; #1;
    show = 1; #1;
    chk(q_t == 8'h5A && q_f == 8'hA5, "show reset value");
    show = 0; #1;
    chk(q_t == 0 && q_f == 0, "spacer when not shown");
    for (int n = 0; n < 100; n++) begin
      v = W'($urandom);
      cap = 1; #1;
      chk(!ack, "no ack on spacer");
      for (int i = 0; i < W; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        if (v[order[i]]) d_t[order[i]] = 1; else d_f[order[i]] = 1;
        #1;
        if (i < W - 1) chk(!ack, "ack waits for the whole word");
      end
      chk(ack, "ack once complete");
      chk(val == v, "stored value");
      cap = 0; #1;
      chk(ack, "ack held while the word is still presented");
      // withdraw the word bit by bit: ack must stay until the last rail is low
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        d_t[order[i]] = 0; d_f[order[i]] = 0;
        #1;
        if (i < W - 1) chk(ack, "ack held until the spacer is complete");
      end
      chk(!ack, "ack falls on the spacer");
      chk(val == v, "value held after spacer");
      // a new word without cap must not be taken
      d_t = ~v; d_f = v; #1;
      chk(val == v, "no capture without cap");
      d_t = 0; d_f = 0;
      show = 1; #1;
      chk(q_t == v && q_f == ~v, "shown value");
      show = 0; #1;
    end
    clr = 1; #1; chk(val == 8'h5A, "clear"); clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
