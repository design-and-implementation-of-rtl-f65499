# A clockless AVR core

This is an 8-bit AVR-compatible microcontroller core with no clock. Each stage of
the processor starts when the previous one says it is finished. Data moves
between registers as **dual-rail** words that announce on their own when they
are valid. A stage therefore waits exactly as long as its logic needs, and the
design does not depend on wire or gate delays. It can be placed and routed on
an FPGA without timing constraints.

The core runs a subset of the AVR instruction set: 63 instructions, covering
arithmetic and logic, compares, relative jumps, conditional branches, register
moves, immediates and status-flag set/clear. Around it sits a small board-level
system: a 50 MHz control block that resets the core and requests one
instruction after another, and converters to an ordinary one-rail EPROM that
holds the program. R31 is shown on eight LEDs. A stand-alone four-stage
dual-rail micropipeline sits beside the processor in the top level. It shows
the same pipeline style in its plainest form.

## Dual-rail words and the four-phase handshake

Every bit travels on two wires `(t, f)`:

| t f | meaning |
|-----|---------|
| 0 0 | spacer: no data yet |
| 1 0 | valid 1 |
| 0 1 | valid 0 |

A word is **complete** when every bit has exactly one rail high. The receiver
detects this with an XOR per bit and an AND over the word (`avr_pkg::dr_complete8`,
`dr_done`). Every transfer is a four-phase handshake:

1. The request rises.
2. The sender drives a complete word.
3. The receiver stores it and raises its acknowledge.
4. The request falls, the sender returns to the spacer, and the acknowledge falls.

No data word is ever sampled on a timing assumption. Completion detection
replaces the clock edge.

## Building blocks

- **`c_element`**: the Muller C-element. The output copies the inputs when
  they agree and holds otherwise. It is written as a gate with its own output
  fed back (`y = a·b + y·(a+b)`). A parameter inverts input `b`, and a clear
  forces 0.
- **`q_element`**: a sequencer. A request on its upper port (`ui`) becomes a
  complete four-phase handshake on its lower port (`lo`/`li`). The upper
  acknowledge `uo` follows only after the lower side has returned to zero.
  Inside are one C-element and two gates:
  - `c = C(ui, li)`
  - `lo = ui·¬c`
  - `uo = c·¬li`

  Chaining Q elements gives a strict sequence of steps.
- **`dr_reg`**: a dual-rail register. While `cap` is high and its input is
  complete, it loads the word. It acknowledges once its stored value equals the
  input, so the acknowledge proves the data arrived. The acknowledge then stays
  high until the input has gone back to the spacer, so a sender cannot start
  its next word while the register still reacts to the old one. While `show`
  is high, it drives its contents as a dual-rail word, and otherwise the spacer.
  It stores one latch per bit rather than two.
- **Acknowledge joins.** Where a step waits for several receivers (fetch,
  execute, write back), their acknowledges are joined with a C-element: the
  join rises when all have acknowledged and falls only when all have released.
- **`dr_micropipeline`**: four stages of per-rail C-element registers. A stage
  enable is the C-element of "my input is complete" and "the next stage is
  empty" (inverted acknowledge). Words ripple forward, and a stalled consumer
  holds them in place.

## The processor: four stages run by four Q elements

```
 req ─► Q1 (IF) ─► Q2 (ID) ─► Q3 (EX) ─► Q4 (WB) ─► ack
        │ Q1_1 fetch IR      │ decode, read      │ ALU, SREG,      │ write register
        │ Q1_2 PC ← NPC      │ register file     │ branch → NPC    │ (or bypass)
        │ Q1_3 NPC ← PC+INC  │                   │                 │
```

`avr_control` chains four Q elements. Each one runs a full handshake with its
stage and then passes the request on. `ack` rises only when write back has
finished, so **one instruction is executed per req/ack cycle**. The stages do
not overlap. The design gets no speed from pipelining. What it gains is that
every step takes exactly the time its logic takes.

**Fetch (`if_stage`).** NPC holds the address of the next instruction, and its
true rails are the program address. Three sub-sequencers run in order:

- **Q1_1** shows NPC. The instruction register (in `id_stage`) captures the
  word returned by the memory together with its address.
- **Q1_2** copies NPC into PC.
- **Q1_3** shows PC and the constant INC (= 1) to the NEXTPC adder. The sum goes
  into NPC.

PC and NPC reset to 0. A taken branch writes NPC through a second port during
execute, so the next fetch starts at the target.

**Decode (`id_stage`, `avr_decoder`).** Q2 shows the instruction register. The
decoder turns the 16-bit word into four dual-rail fields for the execute latch:

- **OPCODE**: a micro-operation from `avr_pkg::uop_e`.
- **DST INDEX**: the destination register, or an SREG bit number.
- **SRC**: the source value. This is a register, an immediate or a branch
  offset.
- **DST**: the destination value. This is a register, or the PC for jumps.

The register file answers dual-rail reads as soon as an index is complete.
Q2 completes when the execute latch has captured all four fields.

**Execute (`ex_stage`, `avr_alu`).** Q3 shows the latch to the ALU. The ALU
then sends its results to up to three receivers:

- the write-back latch: index, result and a write flag;
- SREG: the new flags;
- NPC: the target `PC + k + 1`, for a taken branch or RJMP only.

Q3 completes when every receiver it addressed has acknowledged. SREG must be
read and written in the same step. To allow this, a copy of SREG is captured
into the execute latch during Q2. The ALU reads the copy while SREG itself
loads the new value.

**Write back (`wb_stage`, `regfile`).** Q4 shows the write-back latch. If the
write flag is 1, the register file stores the word and acknowledges once the
register holds it. If the flag is 0 (branches, compares, flag instructions),
Q4 acknowledges at once: this is the **write-back bypass**. Every write to R31
also loads an output register with the complement of the value, which drives
the LEDs. It reads 00 after reset, then FF, FE, ... while R31 counts 0, 1, 2, ...

## Instruction subset

| group | instructions |
|-------|--------------|
| arithmetic/logic | ADD ADC SUB SUBI SBC SBCI AND ANDI OR ORI EOR COM NEG SBR CBR INC DEC TST CLR SER |
| branch | RJMP CP CPC CPI BRBS BRBC and all their aliases (BREQ BRNE BRCS BRCC BRSH BRLO BRMI BRPL BRGE BRLT BRHS BRHC BRTS BRTC BRVS BRVC BRIE BRID) |
| transfer | MOV LDI |
| bit | SEC CLC SEN CLN SEZ CLZ SEI CLI SES CLS SEV CLV SET CLT SEH CLH, NOP |

Encodings and flag rules are the standard AVR ones. Words outside the subset
execute as NOP. The program counter is 8 bits, so programs span 256 words, and
branch targets wrap modulo 256.

## Board-level system (`avr_system`)

- **`test_controller`** (50 MHz, synchronous). It stretches the reset button
  into a clear of `RESET_CYCLES` clocks (1,000,000 = 20 ms). It then raises the
  core's request, waits for the acknowledge (synchronised through two
  flip-flops), drops the request, waits for the acknowledge to fall, and
  repeats. `instr_count` counts completed instructions.
- **`dual_to_single`** turns the dual-rail address into a plain address (the
  true rails) and a read strobe. The strobe is a C-element tree over the
  per-bit ORs of the rails. It rises only when every address bit is valid, and
  falls only when all have returned to the spacer.
- **`single_to_dual`** turns the 16-bit EPROM word into dual-rail while its
  enable is high, and drives all rails low otherwise. The board version is a
  differential line driver with pull-down resistors.
- The EPROM output enable is the inverted strobe. The converter enable
  (`drv_enable`) is the strobe delayed by `ACCESS_CYCLES` clocks (13 = 260 ns).
  The core therefore sees a word only after the memory output has settled.
  This is the one place where the system relies on timing, and it sits outside
  the core.

Top-level ports:

- the EPROM interface (`eprom_addr`, `eprom_oe_n`, `eprom_data`);
- `led`;
- `instr_count`;
- the micropipeline ports `mp_*`.

The EPROMs and LEDs are off-chip and are not part of the RTL. The testbench
models the memory in `tb/eprom16_model.sv`.

## Where this design departs from its source description

- **Fetch address.** The fetch address comes from NPC, PC is loaded from NPC,
  and NPC then gets PC+1. The written description of the fetch order can also
  be read as the reverse. That reading would fetch each address twice, so the
  order that yields the sequence 0, 1, 2, 3, 2, 3, ... for the looping test
  program was chosen.
- **Jump.** The test program's jump back to address 2 is encoded as `RJMP -2`
  (0xCFFE). The two-word absolute `JMP` is **not implemented**, because the
  core fetches one word per instruction.
- **SREG placement.** SREG's position, the captured SREG copy, and the
  write-flag field that drives the bypass are choices of this design.
- **LED register.** Resetting the LED register to 00 and loading it with the
  complement of R31 matches the published simulation trace. The exact LED
  polarity of the original board is not known.
- **Memory timing.** The `drv_enable` delay is an addition. It keeps the
  dual-rail data from changing while the memory output is still settling.
- **`dr_reg` storage.** `dr_reg` stores one latch per bit rather than one per
  rail. Holding its acknowledge until the input returns to the spacer, and
  joining several acknowledges with C-elements, are choices of this design.
- **Widths.** Field widths are choices of this design: the 5-bit
  micro-operation code and the 8-bit width of the stand-alone micropipeline.

## Simulating

Everything is plain SystemVerilog and simulates with Verilator 5 in timing
mode. The package must come first:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/avr_pkg.sv tb/avr_ref_pkg.sv tb/tb_async_avr.sv --top-module tb_async_avr
./obj_dir/Vtb_async_avr
```

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
with a watchdog if a handshake hangs.

| testbench | what it shows |
|-----------|---------------|
| `tb_avr_system` | The whole board at default parameters (20 ms reset at 50 MHz), with the looping-addition program (LED 00, FF, FE, ...), a second reset, and a count-down loop with a conditional branch. It counts clears, memory reads, register writes, bypasses, taken and not-taken branches, and micropipeline words. About 7 s of host time. |
| `tb_async_avr` | The core alone against an instruction-level reference model (`tb/avr_ref_pkg.sv`). It runs the looping addition and thousands of random programs, comparing registers, SREG and the fetch addresses. |
| `tb_instruction_set` | Every one of the 63 implemented mnemonics, run many times through the core with random operands and flags. Each conditional branch is seen both taken and not taken. Registers, SREG and fetch addresses are compared after every instruction. |
| `tb_<block>` | One per block. Examples: exhaustive C-element and Q-element sequences, register hold and acknowledge rules, micropipeline stalls with random delays, decoder and ALU against the reference model. |

The combinational feedback loops of the C-elements and handshakes show up in
Verilator as `UNOPTFLAT` warnings and in synthesis as logic loops and latches.
They are the intended circuit. Each affected module says so in its header. In
testbenches, keep every spacer phase at least one time unit long: a spacer of
zero width is invisible to the settling loops.

## How far it can be trusted

- Each block has a self-checking testbench. A deliberately broken copy of each
  block makes its testbench fail.
- The core matches an independent instruction-level model over tens of
  thousands of random instructions.
- Delay-insensitivity itself is **not** proven. Verilator settles the
  feedback loops with zero gate delays. Only the delays outside the core are
  varied: the memory answers after 1 to 12 time units and the request moves
  after 1 to 8 in `tb_instruction_set`, and the micropipeline test uses
  handshake delays of 1 to 3.
- The core has not been checked on an FPGA.
