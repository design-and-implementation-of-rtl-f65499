// Testbench of the dual-rail four-stage micropipeline: a sender and a receiver
// with random delays run the four-phase dual-rail protocol at both ends.
// Checks that every word comes out once, in order, unchanged, and that with a
// stalled receiver the pipeline fills up (holds more than one word) and then
// stalls the sender.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_dr_micropipeline;
  localparam int W = 8;
  logic clr, a_in, a_out;
  logic [W-1:0] d_in_t, d_in_f, d_out_t, d_out_f;
  int checks = 0, failures = 0;
  logic [W-1:0] sent [$];
  int n_sent = 0, n_recv = 0;
  bit  rx_enable;
  bit  tx_done;

  dr_micropipeline #(.W(W), .STAGES(4)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // sender
  task automatic send(input logic [W-1:0] v);
    d_in_t = v; d_in_f = ~v;
    wait (a_in);
    #($urandom_range(1, 3));
    d_in_t = 0; d_in_f = 0;
    wait (!a_in);
    #($urandom_range(1, 3));
  endtask

  // receiver
  initial begin
    a_out = 0;
    forever begin
      wait (rx_enable && (&(d_out_t ^ d_out_f)));
      #($urandom_range(1, 3));
      chk(sent.size() > 0, "word expected");
      if (sent.size() > 0) chk(d_out_t == sent.pop_front(), "word order and value");
      n_recv++;
      a_out = 1;
      wait (~|(d_out_t | d_out_f));
      #($urandom_range(1, 3));
      a_out = 0;
    end
  end

  initial begin
    logic [W-1:0] v;
    int held;
    clr = 1; d_in_t = 0; d_in_f = 0; rx_enable = 0; #5; clr = 0; #5;
    // fill with the receiver stalled
    held = 0;
    for (int i = 0; i < 8; i++) begin
      fork
        begin v = W'($urandom); sent.push_back(v); send(v); held++; end
        begin #200; end
      join_any
      disable fork;
      if (held != i + 1) break;
    end
    $display("words accepted while the receiver stalls: %0d", held);
    chk(held >= 2 && held <= 4, "pipeline holds several words, then stalls the sender");
    // the stalled send is still presented: drop it, flush the rest
    if (sent.size() > held) void'(sent.pop_back());
    d_in_t = 0; d_in_f = 0;
    rx_enable = 1;
    wait (n_recv == held);
    #20;
    for (int i = 0; i < 200; i++) begin
      v = W'($urandom); sent.push_back(v); send(v);
    end
    wait (n_recv == held + 200);
    #20;
    chk(sent.size() == 0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
