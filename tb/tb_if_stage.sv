// Testbench of the instruction fetch stage. Each Q1 handshake must produce
// exactly one fetch whose dual-rail address is the previous address plus one
// (starting from 0 after clear), with the address at the spacer outside the
// fetch step. Between fetches a branch target is sometimes written through
// the NPC branch port; the next fetch must then come from the target.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_if_stage;
  logic       clr, q1_lo, q1_li, fetch_req, fetch_ack, br_req, br_ack;
  logic [7:0] addr_t, addr_f, br_t, br_f;
  int checks = 0, failures = 0, n_fetch = 0, n_branch = 0;
  logic [7:0] seen;

  if_stage dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // instruction latch stand-in
  initial fetch_ack = 0;
  always @(fetch_req) begin
    if (fetch_req) begin
      #1;
      chk(&(addr_t ^ addr_f), "address complete during fetch");
      seen = addr_t;
      n_fetch++;
      #1 fetch_ack = 1;
    end else begin
      #1 fetch_ack = 0;
    end
  end

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] exp, tgt;
    int t;
    clr = 1; q1_lo = 0; br_req = 0; br_t = 0; br_f = 0; #3; clr = 0; #2;
    exp = 0;
    for (int n = 0; n < 600; n++) begin
      q1_lo = 1;
      t = 0; while (!q1_li && t < 100) begin #1; t++; end
      chk(q1_li, "Q1 acknowledged");
      chk(n_fetch == n + 1, "one fetch per Q1 handshake");
      chk(seen == exp, $sformatf("fetch address %h exp %h", seen, exp));
      chk(addr_t == 0 && addr_f == 0, "address spacer after the fetch");
      q1_lo = 0;
      t = 0; while (q1_li && t < 100) begin #1; t++; end
      chk(!q1_li, "Q1 ack falls");
      exp = exp + 1;
      if ($urandom_range(0, 3) == 0) begin
        tgt = 8'($urandom);
        br_req = 1; #1;
        br_t = tgt; br_f = ~tgt;
        t = 0; while (!br_ack && t < 10) begin #1; t++; end
        chk(br_ack, "branch port acknowledged");
        br_req = 0; #1;
        br_t = 0; br_f = 0; #1;
        chk(!br_ack, "branch ack falls");
        exp = tgt;
        n_branch++;
      end
      #2;
    end
    chk(n_branch > 0, "branches written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
