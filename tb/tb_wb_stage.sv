// Testbench of the write-back stage: captures random (index, result, write
// flag) triples from the execution side, then runs the Q4 handshake against a
// register file responder. With the flag set the write request must carry
// the captured index and result; with the flag clear the step must finish
// without any write request (bypass).
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_wb_stage;
  logic       clr, q3_lo, wb_ack, ww_t, ww_f, q4_lo, q4_li, wreq, wack, bypass;
  logic [4:0] wi_t, wi_f, wa_t, wa_f;
  logic [7:0] wd_t, wd_f, rw_t, rw_f;
  int checks = 0, failures = 0, n_bypass = 0, n_write = 0;

  wb_stage dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // register file responder
  initial wack = 0;
  always @(wreq) begin #2; wack = wreq; end

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [4:0] i; logic [7:0] d; logic w; int t;
    clr = 1; q3_lo = 0; q4_lo = 0; {wi_t, wi_f, wd_t, wd_f, ww_t, ww_f} = '0; #2; clr = 0; #1;
    for (int n = 0; n < 300; n++) begin
      i = 5'($urandom); d = 8'($urandom); w = 1'($urandom);
      q3_lo = 1; #1;
      wi_t = i; wi_f = ~i; wd_t = d; wd_f = ~d; #1;
      chk(!wb_ack, "wait for the write flag");
      ww_t = w; ww_f = ~w; #1;
      chk(wb_ack, "capture ack");
      q3_lo = 0; #1; {wi_t, wi_f, wd_t, wd_f, ww_t, ww_f} = '0; #1;
      chk(!wb_ack, "capture ack falls");
      q4_lo = 1; #0.5;
      if (w) begin
        chk(wreq && wa_t == i && wa_f == ~i && rw_t == d && rw_f == ~d, "write request fields");
        chk(!q4_li, "waits for the register file");
        t = 0; while (!q4_li && t < 10) begin #1; t++; end
        chk(q4_li, "ack after the write");
        n_write++;
      end else begin
        chk(!wreq && q4_li && bypass, "bypass without a write");
        n_bypass++;
      end
      q4_lo = 0; #0.5;
      chk(!wreq && wa_t == 0 && rw_t == 0, "spacer after Q4");
      t = 0; while (q4_li && t < 10) begin #1; t++; end
      chk(!q4_li, "Q4 ack falls");
      #3;
    end
    chk(n_bypass > 0 && n_write > 0, "both paths used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
