// Testbench of the Q element: the lower side is a responder with random
// delays. Checks the event order of the published timing diagram
// (ui up, lo up, li up, lo down, li down, uo up; then ui down, uo down) for
// many handshakes, and that lo never rises again before ui has been withdrawn.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_q_element;
  logic clr, ui, uo, lo, li;
  int checks = 0, failures = 0;
  int lo_rises = 0;

  q_element dut (.clr(clr), .ui(ui), .uo(uo), .lo(lo), .li(li));

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  // lower-side responder: ack follows request after a random delay
  initial li = 0;
  always @(lo) begin
    #($urandom_range(1, 5));
    li = lo;
  end
  always @(posedge lo) lo_rises++;

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clr = 1; ui = 0; #5; clr = 0; #5;
    chk(!lo && !uo, "idle after clear");
    for (int n = 0; n < 50; n++) begin
      ui = 1; #0.1;
      wait (lo); chk(!uo, "lo before uo");
      wait (li); wait (!lo); chk(!uo, "uo waits for lower return to zero");
      wait (!li); #0.1;
      chk(uo, "uo after lower handshake");
      chk(lo_rises == n + 1, "exactly one lower handshake");
      #($urandom_range(1, 5));
      chk(!lo, "no second lower request while ui high");
      ui = 0; #0.1;
      chk(!uo, "uo falls with ui");
      chk(!lo, "lo stays low during return");
      #($urandom_range(1, 5));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
