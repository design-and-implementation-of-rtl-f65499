// End-to-end testbench of the board-level design at its default parameters
// (50 MHz control clock, 20 ms clear). The program memory is modelled by two
// byte-wide EPROMs.
// Program 1 is the looping addition (LDI R31,0; LDI R30,1; ADD R31,R30; jump
// to ADD): the complemented R31 output must read 00 after the clear, FF after
// the first instruction and then count down by one per ADD.
// The reset button is then pressed again, a count-down loop (LDI, INC, DEC,
// BRNE, jump to self) is run and R31 must end at 5 (output FA).
// Alongside, words are pushed through the stand-alone micropipeline.
// The fetch addresses (00 01 02 03 02 03 ...) and the dual-rail instruction
// codes handed to the core are checked, and so is the four-phase order of
// req and ack between the control block and the core.
// Counted mechanisms (each must occur): clear, instruction handshakes, memory
// reads, register writes, write-back bypass, taken and not-taken branches,
// micropipeline words.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_avr_system;
  timeunit 1ns; timeprecision 1ps;
  logic        clk, rst_n;
  logic [7:0]  eprom_addr, led;
  logic        eprom_oe_n;
  logic [15:0] eprom_data;
  logic [31:0] instr_count;
  logic        mp_clr, mp_in_ack, mp_out_ack;
  logic [7:0]  mp_in_t, mp_in_f, mp_out_t, mp_out_f;

  avr_system dut (
    .clk_50mhz(clk), .reset_btn_n(rst_n), .eprom_addr(eprom_addr), .eprom_oe_n(eprom_oe_n),
    .eprom_data(eprom_data), .led(led), .instr_count(instr_count),
    .mp_clr(mp_clr), .mp_in_t(mp_in_t), .mp_in_f(mp_in_f), .mp_in_ack(mp_in_ack),
    .mp_out_t(mp_out_t), .mp_out_f(mp_out_f), .mp_out_ack(mp_out_ack));

  eprom16_model #(.ACCESS(120)) u_mem (.addr(eprom_addr), .oe_n(eprom_oe_n), .data(eprom_data));

  int checks = 0, failures = 0;
  int n_clear = 0, n_reads = 0, n_bypass = 0, n_writes = 0, n_taken = 0, n_not_taken = 0, n_mp = 0;

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  initial clk = 0;
  always #10 clk = ~clk;   // 50 MHz, 1 unit = 1 ns

  always @(posedge dut.sim_clr) n_clear++;
  always @(negedge eprom_oe_n) n_reads++;
  always @(posedge dut.wb_bypass) n_bypass++;
  always @(posedge dut.u_avr.u_wb.wreq) n_writes++;
  bit took = 0;
  always @(posedge dut.u_avr.br_req) took = 1;
  always @(negedge dut.u_avr.lo[2]) begin
    if (dut.u_avr.u_ex.v_op inside {5'd18, 5'd19}) begin
      if (took) n_taken++; else n_not_taken++;
    end
    took = 0;
  end

  // memory reads: address sequence and the dual-rail word handed to the core
  logic [7:0]  rd_addr [$];
  logic [15:0] rd_t [$], rd_f [$];
  always @(negedge eprom_oe_n) rd_addr.push_back(eprom_addr);
  always @(posedge dut.drv_enable) begin
    #1;
    rd_t.push_back(dut.instr_t);
    rd_f.push_back(dut.instr_f);
  end

  // four-phase rule between the control block and the core
  always @(posedge dut.sim_ack) chk(dut.sim_req, "ack rises only while req is high");
  always @(negedge dut.sim_ack) chk(!dut.sim_req, "ack falls only after req fell");

  initial begin
    #200ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wait_instr(input int n);
    int start;
    start = instr_count;
    while (instr_count < start + n) @(posedge clk);
  endtask

  // micropipeline side: sender and receiver
  task automatic mp_send(input logic [7:0] v);
    mp_in_t = v; mp_in_f = ~v;
    wait (mp_in_ack); #3;
    mp_in_t = 0; mp_in_f = 0;
    wait (!mp_in_ack); #3;
  endtask
  initial begin
    mp_out_ack = 0;
    forever begin
      wait (&(mp_out_t ^ mp_out_f)); #2;
      chk(mp_out_t == 8'(8'h30 + n_mp), "micropipeline word");
      n_mp++;
      mp_out_ack = 1;
      wait (~|(mp_out_t | mp_out_f)); #2;
      mp_out_ack = 0;
    end
  end

  initial begin
    mp_clr = 1; mp_in_t = 0; mp_in_f = 0;
    // program 1: looping addition
    for (int a = 0; a < 256; a++) u_mem.load(a, 16'h0000);
    u_mem.load(0, 16'hE0F0);   // LDI R31,0
    u_mem.load(1, 16'hE0E1);   // LDI R30,1
    u_mem.load(2, 16'h0FFE);   // ADD R31,R30
    u_mem.load(3, 16'hCFFE);   // jump to 2
    rst_n = 0;
    #1000;
    rst_n = 1;
    #100;
    chk(dut.sim_clr, "clear held after the button");
    chk(led == 8'h00, "output 00 while cleared");
    #19ms;
    chk(dut.sim_clr, "clear lasts at least 20 ms");
    wait (!dut.sim_clr);
    chk($time >= 20ms, "clear length");
    mp_clr = 0;
    fork
      for (int i = 0; i < 20; i++) mp_send(8'(8'h30 + i));
    join_none
    wait_instr(1);
    chk(led == 8'hFF, $sformatf("after LDI R31,0: %h", led));
    wait_instr(2);
    chk(led == 8'hFE, $sformatf("after first ADD: %h", led));
    for (int k = 2; k <= 10; k++) begin
      wait_instr(2);
      chk(led == 8'(8'hFF - k), $sformatf("after ADD %0d: %h", k, led));
    end

    // fetch addresses 00 01 02 03 02 03 ... and the first instruction codes on both rails
    for (int i = 0; i < 12; i++)
      chk(rd_addr[i] == ((i < 4) ? 8'(i) : 8'(2 + (i % 2))), $sformatf("fetch %0d address %h", i, rd_addr[i]));
    chk(rd_t[0] == 16'hE0F0 && rd_f[0] == 16'h1F0F, $sformatf("LDI R31,0 rails %h/%h", rd_t[0], rd_f[0]));
    chk(rd_t[1] == 16'hE0E1 && rd_f[1] == 16'h1F1E, $sformatf("LDI R30,1 rails %h/%h", rd_t[1], rd_f[1]));
    chk(rd_t[2] == 16'h0FFE && rd_f[2] == 16'hF001, $sformatf("ADD R31,R30 rails %h/%h", rd_t[2], rd_f[2]));
    chk(rd_t[3] == 16'hCFFE && rd_f[3] == 16'h3001, $sformatf("jump rails %h/%h", rd_t[3], rd_f[3]));

    // program 2: count-down loop with conditional branch
    rst_n = 0;
    u_mem.load(0, 16'hE005);   // LDI R16,5
    u_mem.load(1, 16'hE0F0);   // LDI R31,0
    u_mem.load(2, 16'h95F3);   // INC R31
    u_mem.load(3, 16'h950A);   // DEC R16
    u_mem.load(4, 16'hF7E9);   // BRNE to 2
    u_mem.load(5, 16'hCFFF);   // jump to self
    #1000;
    rst_n = 1;
    wait (!dut.sim_clr);
    chk(led == 8'h00, "output cleared by the second reset");
    wait_instr(2 + 5 * 3 + 3);
    chk(dut.u_avr.r31 == 8'd5 && led == 8'hFA, $sformatf("count-down result %h", led));
    chk(dut.u_avr.u_rf.rf[16] == 8'd0, "loop counter reached zero");

    $display("events: clear=%0d instr=%0d reads=%0d writes=%0d bypass=%0d taken=%0d not_taken=%0d mp=%0d",
             n_clear, instr_count, n_reads, n_writes, n_bypass, n_taken, n_not_taken, n_mp);
    chk(n_clear == 2, "clear happened");
    chk(n_reads > 0, "memory reads happened");
    chk(n_writes > 0, "register writes happened");
    chk(n_bypass > 0, "write-back bypass happened");
    chk(n_taken > 0, "taken branch happened");
    chk(n_not_taken > 0, "not-taken branch happened");
    chk(n_mp == 20, "micropipeline words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
