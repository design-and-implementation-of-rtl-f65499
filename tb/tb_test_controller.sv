// Testbench of the test control block, with a reduced clear length. Checks
// that the clear lasts RESET_CYCLES clock cycles after the button is released,
// that requests follow the four-phase protocol against a responder with
// random delays (req falls only after ack, next req only after ack fell), that
// the memory enable is inverted, and that the line driver enable follows the
// read enable only after ACCESS_CYCLES clocks and drops with it.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_test_controller;
  timeunit 1ns; timeprecision 1ps;
  localparam int RC = 50, AC = 13;
  logic clk, rst_btn_n, sim_clr, sim_req, sim_ack, inv_enb_in, inv_enb_out, drv_enable;
  logic [31:0] instr_count;
  int checks = 0, failures = 0, n_hs = 0;

  test_controller #(.RESET_CYCLES(RC), .ACCESS_CYCLES(AC)) dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial clk = 0;
  always #10 clk = ~clk;

  // asynchronous responder
  initial sim_ack = 0;
  always @(sim_req) begin
    if (sim_req) chk(!sim_ack, "request only after ack fell");
    else         chk(sim_ack, "request withdrawn only after ack");
    #($urandom_range(5, 300));
    sim_ack = sim_req;
    if (!sim_req) n_hs++;
  end

  initial begin
    #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cyc;
    inv_enb_in = 0;
    rst_btn_n = 0; #95; rst_btn_n = 1;
    cyc = 0;
    while (sim_clr) begin @(posedge clk); #1; cyc++; end
    chk(cyc >= RC - 2 && cyc <= RC + 2, $sformatf("clear length %0d cycles", cyc));
    repeat (40) begin
      int c0;
      c0 = instr_count;
      wait (instr_count == c0 + 1);
    end
    chk(instr_count == 40 && n_hs == 40, "40 handshakes counted");
    // memory enable path
    @(posedge clk); #3;
    inv_enb_in = 1; #1;
    chk(inv_enb_out == 0, "enable inverted");
    cyc = 0;
    while (!drv_enable && cyc < 100) begin @(posedge clk); #1; cyc++; end
    chk(cyc >= AC && cyc <= AC + 4, $sformatf("driver enable after %0d cycles", cyc));
    inv_enb_in = 0; #1;
    chk(inv_enb_out == 1, "enable released");
    repeat (4) @(posedge clk);
    #1 chk(!drv_enable, "driver enable drops with the read enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
