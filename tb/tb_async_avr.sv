// Testbench of the asynchronous AVR core.
//
// The testbench plays the program memory and its converters: when the core's
// dual-rail address becomes complete it answers, after a short delay, with the
// dual-rail instruction word; when the address returns to the spacer, so does
// the word. Each instruction is one four-phase req/ack handshake.
// Part 1 runs the looping addition program (LDI R31,0; LDI R30,1;
// ADD R31,R30; jump back to ADD) and checks the fetch address sequence, the
// instruction codes and the complemented R31 output (00, FF, FE, FD, ...).
// Part 2 runs random programs of the implemented instruction subset and
// compares every register, SREG and the program counter with an instruction
// level reference model after each instruction. It also counts how often the
// write-back bypass, taken branches and register writes occurred.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
module tb_async_avr;
  import avr_ref_pkg::*;

  logic        clr, req, ack;
  logic [7:0]  addr_t, addr_f, r31, r31_out, sreg;
  logic [15:0] instr_t, instr_f;
  logic        wb_bypass;

  async_avr dut (.*);

  int checks = 0, failures = 0;
  logic [15:0] prog [256];
  int          fetches = 0;
  logic [7:0]  last_addr;
  int          n_bypass = 0, n_branch = 0, n_write = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // program memory with one-rail/two-rail conversion
  initial begin instr_t = '0; instr_f = '0; end
  always @(addr_t or addr_f) begin
    if (&(addr_t ^ addr_f)) begin
      last_addr = addr_t;
      fetches++;
      #3;
      instr_t = prog[addr_t];
      instr_f = ~prog[addr_t];
    end else if (~|(addr_t | addr_f)) begin
      #3;
      instr_t = '0;
      instr_f = '0;
    end
  end

  always @(posedge wb_bypass) n_bypass++;

  task automatic run_instr();
    int t;
    req = 1'b1;
    t = 0;
    while (!ack && t < 1000) begin #1; t++; end
    check(ack, "ack rises");
    #2 req = 1'b0;
    t = 0;
    while (ack && t < 1000) begin #1; t++; end
    check(!ack, "ack falls");
    #2;
  endtask

  task automatic do_clear();
    req = 1'b0;
    clr = 1'b1;
    #10 clr = 1'b0;
    #5;
  endtask

  avr_state_t ref_s;
  logic [7:0] exp_out;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_addr [12];
    int kind;
    // ---------------- part 1: looping addition program ----------------
    for (int i = 0; i < 256; i++) prog[i] = 16'h0000;
    prog[0] = 16'hE0F0;   // LDI R31,0
    prog[1] = 16'hE0E1;   // LDI R30,1
    prog[2] = 16'h0FFE;   // ADD R31,R30
    prog[3] = 16'hCFFE;   // jump to address 2 (RJMP -2)
    check(prog[0] == 16'hE0F0 && ~prog[0] == 16'h1F0F, "LDI R31,0 code/false rails");
    check(prog[2] == 16'h0FFE && ~prog[2] == 16'hF001, "ADD R31,R30 code/false rails");
    expect_addr = '{8'd0, 8'd1, 8'd2, 8'd3, 8'd2, 8'd3, 8'd2, 8'd3, 8'd2, 8'd3, 8'd2, 8'd3};
    do_clear();
    check(r31_out == 8'h00, "R31 output 00 after clear");
    exp_out = 8'h00;
    for (int i = 0; i < 12; i++) begin
      run_instr();
      check(last_addr == expect_addr[i], $sformatf("fetch address %0d: got %0d exp %0d", i, last_addr, expect_addr[i]));
      if (i == 0) exp_out = 8'hFF;
      if (expect_addr[i] == 8'd2) exp_out = exp_out - 8'd1;
      check(r31_out == exp_out, $sformatf("R31 output after %0d: %h exp %h", i, r31_out, exp_out));
    end
    check(fetches == 12, "one fetch per instruction");

    // ---------------- part 2: random programs ----------------
    for (int p = 0; p < 6; p++) begin
      for (int i = 0; i < 256; i++) prog[i] = rand_instr($urandom, 16'($urandom));
      do_clear();
      ref_reset(ref_s);
      for (int n = 0; n < 300; n++) begin
        logic [7:0] pc_before;
        pc_before = ref_s.pc;
        kind = ref_step(ref_s, prog[pc_before]);
        if (kind == 0) n_write++;
        if (kind == 1) n_branch++;
        run_instr();
        check(last_addr == pc_before, $sformatf("fetch addr %0d exp %0d", last_addr, pc_before));
        for (int r = 0; r < 32; r++)
          check(dut.u_rf.rf[r] == ref_s.r[r],
                $sformatf("R%0d = %h exp %h after %h at %0d", r, dut.u_rf.rf[r], ref_s.r[r], prog[pc_before], pc_before));
        check(sreg == ref_s.sreg, $sformatf("SREG %b exp %b after %h", sreg, ref_s.sreg, prog[pc_before]));
      end
      // the next fetch address equals the model's program counter
      run_instr();
      check(last_addr == ref_s.pc, "program counter after random run");
    end

    $display("events: bypass=%0d taken_branch=%0d reg_write=%0d", n_bypass, n_branch, n_write);
    check(n_bypass > 0, "write-back bypass happened");
    check(n_branch > 0, "taken branch happened");
    check(n_write > 0, "register write happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
