// Testbench of the stage controller chain Q1..Q4: each stage is answered by a
// responder with a random delay. Checks that the four stage handshakes run
// strictly one after another in the order IF, ID, EX, WB (never two at once),
// that ack rises only after the WB handshake and falls after req falls.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_avr_control;
  logic       clr, req, ack;
  logic [3:0] lo, li;
  int checks = 0, failures = 0;
  int order [$];

  avr_control dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  for (genvar i = 0; i < 4; i++) begin : g_resp
    initial li[i] = 0;
    always @(lo[i]) begin
      #($urandom_range(1, 4));
      li[i] = lo[i];
    end
    always @(posedge lo[i]) order.push_back(i);
  end

  // never two stages active at once
  always @(lo) chk($countones(lo | li) <= 1, "one stage at a time");

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 1; req = 0; #5; clr = 0; #5;
    for (int n = 0; n < 40; n++) begin
      order.delete();
      req = 1;
      wait (ack);
      chk(order.size() == 4, "four stage handshakes per request");
      for (int i = 0; i < order.size() && i < 4; i++) chk(order[i] == i, "stage order");
      chk(lo == 0 && li == 0, "all stages idle at ack");
      #2 req = 0;
      wait (!ack);
      chk(order.size() == 4, "no stage runs during return to zero");
      #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
