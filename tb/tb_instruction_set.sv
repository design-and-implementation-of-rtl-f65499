// Instruction-set workload for the asynchronous AVR core: every mnemonic of the
// implemented list (20 arithmetic/logic, 24 of the 25 branch mnemonics, MOV and
// LDI, the 16 flag set/clear mnemonics and NOP) is executed many times through
// the whole core, each with random operands and random prior register and flag
// contents.
//
// Each round builds a 256-word program: LDI R16..R31 with random constants,
// MOV R0..R15 from them, then a random stream of mnemonics. Branches and RJMP
// use offsets 0 or +1, so control flow stays inside the stream while both the
// taken and the not-taken paths occur. After every instruction all 32
// registers, SREG and the next fetch address are compared with the
// instruction-level reference model. At the end every mnemonic must have run,
// and every conditional branch must have been both taken and not taken.
// The two-word JMP of the list is not part of the core and is not run.
//
// Interface: none (top-level testbench). Timing: the memory answers 1 to 12
// time units (random) after a complete address or spacer, and the environment
// waits 1 to 8 units (random) before each req edge, so the core must work
// whatever the response times; each instruction is one req/ack handshake.
//
// All checks and expected values in this file are this design's own; they are
// computed from the AVR instruction rules, not read from the core.
module tb_instruction_set;
  import avr_ref_pkg::*;

  logic        clr, req, ack;
  logic [7:0]  addr_t, addr_f, r31, r31_out, sreg;
  logic [15:0] instr_t, instr_f;
  logic        wb_bypass;

  async_avr dut (.*);

  localparam int NM = 63;
  int checks = 0, failures = 0;
  logic [15:0] prog [256];
  int          mn_at [256];
  logic [7:0]  last_addr;
  int          runs [NM], taken [NM], not_taken [NM];
  string       names [NM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin instr_t = '0; instr_f = '0; end
  always @(addr_t or addr_f) begin
    if (&(addr_t ^ addr_f)) begin
      last_addr = addr_t;
      #($urandom_range(1, 12)); instr_t = prog[addr_t]; instr_f = ~prog[addr_t];
    end else if (~|(addr_t | addr_f)) begin
      #($urandom_range(1, 12)); instr_t = '0; instr_f = '0;
    end
  end

  task automatic run_instr();
    int t;
    req = 1'b1; t = 0;
    while (!ack && t < 1000) begin #1; t++; end
    check(ack, "ack rises");
    #($urandom_range(1, 8)) req = 1'b0; t = 0;
    while (ack && t < 1000) begin #1; t++; end
    check(!ack, "ack falls");
    #($urandom_range(1, 8));
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // two-register format: oooo oord dddd rrrr
  function automatic logic [15:0] rr(input logic [5:0] op, input logic [4:0] d, input logic [4:0] r);
    return {op, r[4], d, r[3:0]};
  endfunction
  // register/immediate format: oooo KKKK dddd KKKK, d = 16..31
  function automatic logic [15:0] ri(input logic [3:0] op, input logic [3:0] d, input logic [7:0] k);
    return {op, k[7:4], d, k[3:0]};
  endfunction
  function automatic logic [15:0] one(input logic [3:0] op, input logic [4:0] d);
    return {7'b1001010, d, op};
  endfunction
  function automatic logic [15:0] brb(input bit clr_form, input logic [2:0] s, input logic [6:0] k);
    return {5'b11110, clr_form, k, s};
  endfunction

  // Encoding of mnemonic m with random operands; for branches sets is_br.
  function automatic logic [15:0] encode(input int m, input logic [4:0] d, input logic [4:0] r,
                                         input logic [7:0] k, input logic [6:0] off, output bit is_br);
    logic [3:0] dh;
    dh = d[3:0];
    is_br = 0;
    case (m)
      0:  return rr(6'b000011, d, r);          // ADD
      1:  return rr(6'b000111, d, r);          // ADC
      2:  return rr(6'b000110, d, r);          // SUB
      3:  return ri(4'h5, dh, k);              // SUBI
      4:  return rr(6'b000010, d, r);          // SBC
      5:  return ri(4'h4, dh, k);              // SBCI
      6:  return rr(6'b001000, d, r);          // AND
      7:  return ri(4'h7, dh, k);              // ANDI
      8:  return rr(6'b001010, d, r);          // OR
      9:  return ri(4'h6, dh, k);              // ORI
      10: return rr(6'b001001, d, r);          // EOR
      11: return one(4'h0, d);                 // COM
      12: return one(4'h1, d);                 // NEG
      13: return ri(4'h6, dh, k);              // SBR = ORI
      14: return ri(4'h7, dh, ~k);             // CBR = ANDI with complement
      15: return one(4'h3, d);                 // INC
      16: return one(4'hA, d);                 // DEC
      17: return rr(6'b001000, d, d);          // TST = AND Rd,Rd
      18: return rr(6'b001001, d, d);          // CLR = EOR Rd,Rd
      19: return ri(4'hE, dh, 8'hFF);          // SER = LDI Rd,0xFF
      20: return {4'hC, 11'd0, off[0]};        // RJMP .+0 / .+1
      21: return rr(6'b000101, d, r);          // CP
      22: return rr(6'b000001, d, r);          // CPC
      23: return ri(4'h3, dh, k);              // CPI
      24: begin is_br = 1; return brb(0, k[2:0], off); end   // BRBS s
      25: begin is_br = 1; return brb(1, k[2:0], off); end   // BRBC s
      26: begin is_br = 1; return brb(0, 3'd1, off); end     // BREQ
      27: begin is_br = 1; return brb(1, 3'd1, off); end     // BRNE
      28: begin is_br = 1; return brb(0, 3'd0, off); end     // BRCS
      29: begin is_br = 1; return brb(1, 3'd0, off); end     // BRCC
      30: begin is_br = 1; return brb(1, 3'd0, off); end     // BRSH
      31: begin is_br = 1; return brb(0, 3'd0, off); end     // BRLO
      32: begin is_br = 1; return brb(0, 3'd2, off); end     // BRMI
      33: begin is_br = 1; return brb(1, 3'd2, off); end     // BRPL
      34: begin is_br = 1; return brb(1, 3'd4, off); end     // BRGE
      35: begin is_br = 1; return brb(0, 3'd4, off); end     // BRLT
      36: begin is_br = 1; return brb(0, 3'd5, off); end     // BRHS
      37: begin is_br = 1; return brb(1, 3'd5, off); end     // BRHC
      38: begin is_br = 1; return brb(0, 3'd6, off); end     // BRTS
      39: begin is_br = 1; return brb(1, 3'd6, off); end     // BRTC
      40: begin is_br = 1; return brb(0, 3'd3, off); end     // BRVS
      41: begin is_br = 1; return brb(1, 3'd3, off); end     // BRVC
      42: begin is_br = 1; return brb(0, 3'd7, off); end     // BRIE
      43: begin is_br = 1; return brb(1, 3'd7, off); end     // BRID
      44: return rr(6'b001011, d, r);          // MOV
      45: return ri(4'hE, dh, k);              // LDI
      // SEC CLC SEN CLN SEZ CLZ SEI CLI SES CLS SEV CLV SET CLT SEH CLH
      46: return 16'h9408;  47: return 16'h9488;
      48: return 16'h9428;  49: return 16'h94A8;
      50: return 16'h9418;  51: return 16'h9498;
      52: return 16'h9478;  53: return 16'h94F8;
      54: return 16'h9448;  55: return 16'h94C8;
      56: return 16'h9438;  57: return 16'h94B8;
      58: return 16'h9468;  59: return 16'h94E8;
      60: return 16'h9458;  61: return 16'h94D8;
      default: return 16'h0000;                // NOP
    endcase
  endfunction

  initial begin
    avr_state_t s;
    names = '{"ADD","ADC","SUB","SUBI","SBC","SBCI","AND","ANDI","OR","ORI","EOR","COM","NEG",
              "SBR","CBR","INC","DEC","TST","CLR","SER","RJMP","CP","CPC","CPI","BRBS","BRBC",
              "BREQ","BRNE","BRCS","BRCC","BRSH","BRLO","BRMI","BRPL","BRGE","BRLT","BRHS","BRHC",
              "BRTS","BRTC","BRVS","BRVC","BRIE","BRID","MOV","LDI",
              "SEC","CLC","SEN","CLN","SEZ","CLZ","SEI","CLI","SES","CLS","SEV","CLV","SET","CLT",
              "SEH","CLH","NOP"};
    foreach (runs[i]) begin runs[i] = 0; taken[i] = 0; not_taken[i] = 0; end
    for (int round = 0; round < 24; round++) begin
      bit is_br;
      for (int a = 0; a < 16; a++) begin
        prog[a] = ri(4'hE, 4'(a), 8'($urandom)); mn_at[a] = -1;           // LDI R16+a,K
        prog[16 + a] = rr(6'b001011, 5'(a), 5'(16 + a)); mn_at[16 + a] = -1; // MOV Ra,R16+a
      end
      for (int a = 32; a < 256; a++) begin
        int m;
        m = $urandom_range(0, NM - 1);
        mn_at[a] = m;
        prog[a] = encode(m, 5'($urandom), 5'($urandom), 8'($urandom), 7'($urandom_range(0, 1)), is_br);
      end
      // the last word must not skip past the end of the stream
      prog[255] = 16'h0000; mn_at[255] = NM - 1;
      req = 1'b0; clr = 1'b1; #10 clr = 1'b0; #5;
      ref_reset(s);
      while (1) begin
        logic [7:0] pc0;
        int kind, m;
        pc0 = s.pc;
        m = mn_at[pc0];
        kind = ref_step(s, prog[pc0]);
        run_instr();
        check(last_addr == pc0, $sformatf("fetch %0d exp %0d", last_addr, pc0));
        for (int r = 0; r < 32; r++)
          check(dut.u_rf.rf[r] == s.r[r], $sformatf("%s: R%0d = %h exp %h",
                m >= 0 ? names[m] : "setup", r, dut.u_rf.rf[r], s.r[r]));
        check(sreg == s.sreg, $sformatf("%s (%h): SREG %b exp %b", m >= 0 ? names[m] : "setup",
              prog[pc0], sreg, s.sreg));
        if (m >= 0) begin
          runs[m]++;
          if (prog[pc0][15:11] == 5'b11110) begin
            // a taken branch with offset 0 lands on the same address as not taken,
            // so the outcome is read from the flag itself
            if (s.sreg[prog[pc0][2:0]] == !prog[pc0][10]) taken[m]++; else not_taken[m]++;
          end
        end
        if (s.pc < pc0 || pc0 == 8'd255) break;
      end
    end
    for (int m = 0; m < NM; m++) begin
      check(runs[m] > 0, $sformatf("%s executed", names[m]));
      if (m >= 24 && m <= 43) begin
        check(taken[m] > 0, $sformatf("%s taken", names[m]));
        check(not_taken[m] > 0, $sformatf("%s not taken", names[m]));
      end
    end
    $display("mnemonics: %0d, runs of ADD %0d, BRIE taken %0d not taken %0d",
             NM, runs[0], taken[42], not_taken[42]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
