// Testbench of the one-rail to two-rail converter: with the strobe high every
// bit must appear on exactly its true or false rail; with the strobe low all
// rails must be low (spacer).
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_single_to_dual;
  localparam int W = 16;
  logic strobe;
  logic [W-1:0] y, z_t, z_f;
  int checks = 0, failures = 0;

  single_to_dual #(.W(W)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      y = W'($urandom);
      strobe = 1; #1;
      for (int i = 0; i < W; i++)
        chk(z_t[i] == y[i] && z_f[i] == !y[i], "valid bit");
      strobe = 0; #1;
      chk(z_t == 0 && z_f == 0, "spacer while strobe low");
    end
    y = 16'hE0F0; strobe = 1; #1;
    chk(z_t == 16'hE0F0 && z_f == 16'h1F0F, "LDI R31,0 rails");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
