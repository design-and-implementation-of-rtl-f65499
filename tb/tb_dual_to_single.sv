// Testbench of the two-rail to one-rail converter: address bits arrive and
// leave one at a time in random order. The strobe must rise only when the last
// bit has become valid, fall only when the last bit has returned to the
// spacer, and the one-rail address must equal the true rails.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_dual_to_single;
  localparam int W = 8;
  logic clr, strobe;
  logic [W-1:0] x_t, x_f, y;
  int checks = 0, failures = 0;

  dual_to_single #(.W(W)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int order [W];
    logic [W-1:0] v;
    clr = 1; x_t = 0; x_f = 0; #2; clr = 0; #1;
    chk(!strobe, "idle");
    for (int n = 0; n < 200; n++) begin
      v = W'($urandom);
      for (int i = 0; i < W; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        if (v[order[i]]) x_t[order[i]] = 1; else x_f[order[i]] = 1;
        #1;
        chk(strobe == (i == W - 1), "strobe rises on the last valid bit");
      end
      chk(y == v, "one-rail address");
      order.shuffle();
      for (int i = 0; i < W; i++) begin
        x_t[order[i]] = 0; x_f[order[i]] = 0;
        #1;
        chk(strobe == (i != W - 1), "strobe falls on the last spacer bit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
