// Instruction-level reference model of the implemented AVR subset, used by the
// testbenches to predict register, status register and program counter
// contents. Written from the AVR instruction set rules, independently of the
// RTL decoder and ALU. Program counter is 8 bits; one word per instruction;
// words outside the subset behave as NOP.
//
// All checks and expected values in this file are this design's own; they are computed
// from the AVR instruction rules and the handshake rules, not read from the block under test.
package avr_ref_pkg;

  typedef struct {
    logic [7:0] r [32];
    logic [7:0] sreg;
    logic [7:0] pc;
  } avr_state_t;

  function automatic void ref_reset(ref avr_state_t s);
    for (int i = 0; i < 32; i++) s.r[i] = 8'h00;
    s.sreg = 8'h00;
    s.pc   = 8'h00;
  endfunction

  // Kind of a word: 0 = writes a register, 1 = taken branch, 2 = other
  function automatic int ref_step(ref avr_state_t s, input logic [15:0] w);
    logic [4:0] d, r, dh;
    logic [7:0] rd, rr, k, res;
    logic       c, z, n, v, h, cin;
    int         kind;
    bit         fl;
    logic [7:0] nextpc;
    d  = w[8:4];
    r  = {w[9], w[3:0]};
    dh = {1'b1, w[7:4]};
    k  = {w[11:8], w[3:0]};
    nextpc = s.pc + 8'd1;
    kind = 2;
    fl   = 0;
    c = s.sreg[0]; z = s.sreg[1]; n = s.sreg[2]; v = s.sreg[3]; h = s.sreg[5];

    if (w[15:12] inside {4'h0, 4'h1, 4'h2} && w[13:10] != 4'b0000 && w[13:10] != 4'b0100) begin
      // two-register ALU group
      rd = s.r[d]; rr = s.r[r];
      case (w[13:10])
        4'b0011, 4'b0111: begin // ADD, ADC
          cin = (w[13:10] == 4'b0111) ? c : 1'b0;
          {c, res} = {1'b0, rd} + {1'b0, rr} + {8'd0, cin};
          h = ((rd[3:0] + rr[3:0] + {3'd0, cin}) > 5'd15);
          v = (rd[7] == rr[7]) && (res[7] != rd[7]);
          n = res[7]; z = (res == 0);
          s.r[d] = res; kind = 0; fl = 1;
        end
        4'b0110, 4'b0010, 4'b0101, 4'b0001: begin // SUB, SBC, CP, CPC
          cin = (w[13:10] == 4'b0010 || w[13:10] == 4'b0001) ? c : 1'b0;
          res = rd - rr - {7'd0, cin};
          c = ({1'b0, rd} < ({1'b0, rr} + {8'd0, cin}));
          h = ({1'b0, rd[3:0]} < ({1'b0, rr[3:0]} + {4'd0, cin}));
          v = (rd[7] != rr[7]) && (res[7] != rd[7]);
          n = res[7];
          if (w[13:10] == 4'b0010 || w[13:10] == 4'b0001) z = (res == 0) && z;
          else                                            z = (res == 0);
          fl = 1;
          if (w[13:10] == 4'b0110 || w[13:10] == 4'b0010) begin s.r[d] = res; kind = 0; end
        end
        4'b1000, 4'b1001, 4'b1010: begin // AND, EOR, OR
          res = (w[13:10] == 4'b1000) ? (rd & rr) : (w[13:10] == 4'b1001) ? (rd ^ rr) : (rd | rr);
          v = 0; n = res[7]; z = (res == 0);
          s.r[d] = res; kind = 0; fl = 1;
        end
        4'b1011: begin s.r[d] = rr; kind = 0; end // MOV
        default: ;
      endcase
    end else if (w[15:12] inside {4'h3, 4'h4, 4'h5, 4'h6, 4'h7}) begin
      rd = s.r[dh];
      case (w[15:12])
        4'h3, 4'h4, 4'h5: begin // CPI, SBCI, SUBI
          cin = (w[15:12] == 4'h4) ? c : 1'b0;
          res = rd - k - {7'd0, cin};
          c = ({1'b0, rd} < ({1'b0, k} + {8'd0, cin}));
          h = ({1'b0, rd[3:0]} < ({1'b0, k[3:0]} + {4'd0, cin}));
          v = (rd[7] != k[7]) && (res[7] != rd[7]);
          n = res[7];
          z = (w[15:12] == 4'h4) ? ((res == 0) && z) : (res == 0);
          fl = 1;
          if (w[15:12] != 4'h3) begin s.r[dh] = res; kind = 0; end
        end
        default: begin // ORI, ANDI
          res = (w[15:12] == 4'h6) ? (rd | k) : (rd & k);
          v = 0; n = res[7]; z = (res == 0);
          s.r[dh] = res; kind = 0; fl = 1;
        end
      endcase
    end else if (w[15:12] == 4'hE) begin // LDI
      s.r[dh] = k; kind = 0;
    end else if (w[15:9] == 7'b1001010) begin
      rd = s.r[d];
      if (w[3:0] == 4'b1000 && w[8] == 1'b0) begin
        // BSET / BCLR
        s.sreg[w[6:4]] = ~w[7];
      end else begin
        case (w[3:0])
          4'b0000: begin res = 8'hFF - rd; c = 1; v = 0; n = res[7]; z = (res == 0); s.r[d] = res; kind = 0; fl = 1; end
          4'b0001: begin res = 8'h00 - rd; c = (res != 0); v = (res == 8'h80);
                         h = (res[3] | rd[3]); n = res[7]; z = (res == 0); s.r[d] = res; kind = 0; fl = 1; end
          4'b0011: begin res = rd + 1; v = (rd == 8'h7F); n = res[7]; z = (res == 0); s.r[d] = res; kind = 0; fl = 1; end
          4'b1010: begin res = rd - 1; v = (rd == 8'h80); n = res[7]; z = (res == 0); s.r[d] = res; kind = 0; fl = 1; end
          default: ;
        endcase
      end
    end else if (w[15:12] == 4'hC) begin // RJMP
      nextpc = s.pc + 8'd1 + w[7:0]; kind = 1;
    end else if (w[15:11] == 5'b11110) begin // BRBS / BRBC
      if (s.sreg[w[2:0]] == ~w[10]) begin
        nextpc = s.pc + 8'd1 + {w[9], w[9:3]}; kind = 1;
      end
    end

    if (fl) begin
      s.sreg[0] = c; s.sreg[1] = z; s.sreg[2] = n; s.sreg[3] = v;
      s.sreg[4] = n ^ v; s.sreg[5] = h;
    end
    s.pc = nextpc;
    return kind;
  endfunction

  // A random word from the implemented instruction set.
  function automatic logic [15:0] rand_instr(input int unsigned sel, input logic [15:0] rnd);
    logic [15:0] w;
    unique case (sel % 12)
      0, 1: begin // two-register group, any sub-op except CPSE
        w = rnd; w[15:14] = 2'b00;
        if (w[13:10] inside {4'b0000, 4'b0100}) w[13:10] = 4'b0011;
      end
      2, 3: begin w = rnd; w[15:12] = 4'(3 + (rnd[15:12] % 5)); end  // CPI..ANDI
      4, 5: begin w = rnd; w[15:12] = 4'hE; end                      // LDI
      6: begin w = {7'b1001010, rnd[8:4], 4'b0000}; unique case (rnd[1:0])
            0: w[3:0] = 4'b0000; 1: w[3:0] = 4'b0001; 2: w[3:0] = 4'b0011; default: w[3:0] = 4'b1010; endcase end
      7: w = {8'b10010100, rnd[7:4], 4'b1000};                      // BSET / BCLR
      8: w = {5'b11110, rnd[10:0]};                                 // BRBS / BRBC
      9: w = {4'hC, rnd[11:0]};                                     // RJMP
      10: w = 16'h0000;                                             // NOP
      default: begin w = rnd; w[15:10] = 6'b001011; end             // MOV
    endcase
    return w;
  endfunction
endpackage
