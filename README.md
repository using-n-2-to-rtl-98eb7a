# SIC: one small 18-bit computer described at three levels of detail

SIC (Small Instruction set Computer) is a single-accumulator machine. It has an
18-bit word, a 13-bit address (8192 words), two index registers and a link flag.
It also has programmed I/O, eight vectored interrupt lines and four buffered
I/O channels.

This repository describes the same machine three ways, each at a different
level of detail:

| level | module | what one clock is | what it has |
|---|---|---|---|
| instruction level | `sic_a_cpu` | one whole instruction | MRI and OPERATE instructions, own memory, no I/O |
| pin level | `sic_b_system` (`sic_b_cpu`, `sic_ram`, `sic_io_mult`) | one register transfer | full instruction set, I/O handshake, interrupts, buffered channels |
| microprogrammed | `sic_c_system` (13 parts) | one microinstruction | full instruction set, interrupts and buffered channels, on a three-bus datapath under a 48-bit microprogram |

`sic_top` places all three side by side. They share only clock and reset, so one
testbench can run a program on each.

## The machine

### Registers

| register | width | use |
|---|---|---|
| AC | 18 | accumulator |
| lf | 1 | link, the carry out of AC |
| PC | 13 | program counter |
| MA | 13 | memory address |
| MD | 18 | memory data |
| IR | 18 | instruction register |
| IA, IB | 13 | index registers |
| MR, INTR | 8 | interrupt mask and interrupt requests |
| intf, enif | 1 | interrupt pending, interrupts enabled |
| CSR | 12 | command/status word sent to or taken from a device |
| BCR, BIOR | 4 | per buffered channel: request pending, direction is input |
| CC | 2 | buffered channel being served |
| BWC | 13 | buffered word count |

### Instruction formats

Memory-reference instructions (MRI) use the layout
`opcode[17:15] | type[14:13] | address[12:0]`.

- Opcodes 0..6: ISZ, LAC, AND, TAD, JMS, DAC, JMP.
- Address types:
  - 0: direct.
  - 1: indirect (the address word is read from memory).
  - 2: indexed by IA (address + IA).
  - 3: indexed by IB (address + IB).

Opcode 7 covers the rest; bits 14:12 split it further:

- **OPERATE** (`IR[17:14] = 1110`) runs in three event times, one after another.
  - Event 1:
    - rotate when bit 12 is set; bit 13 gives the direction (0 left, 1 right);
    - otherwise the link action in bits 11:10 (1 STL, 2 CLL, 3 HLT);
    - then the AC action in bits 9:8 (1 STA, 2 CLA, 3 CMA).
  - Event 2: rotate when bit 7 is set; otherwise bits 6:4 select:
    - 1 SZL (skip if link is 0);
    - 2 DFA and 3 DFB (AC ← IA or IB);
    - 4 DTA and 6 DTB (IA or IB ← AC);
    - 5 INA and 7 INB (IA or IB + 1).
  - Event 3: rotate when bit 3 is set. Otherwise skip the next instruction if
    AC<0 and bit 2, or AC=0 and bit 1, or AC>0 and bit 0.
    - SKZ is `0x0002`.
    - "Skip if AC ≥ 0" is `0x0003`.
  - A taken SZL ends the instruction, so event 3 does not run.
  - Examples: RAL = `opr(0x1000)`, RAR = `opr(0x3000)`, HLT = `opr(0x0C00)`.
- **TST** (`IR[14:12] = 100`): a one-clock no-operation in this design.
- **I/O** (`IR[17:12] = 111101`): `device[11:9] | command[8:7] | direction[6] | compare[5:0]`.
  - Command 0 moves a data word: OD when the direction is 0, ID when it is 1.
  - Command 1 reads status. IS skips when `status[5:0] & compare` is not 0.
  - Command 2 marks buffered channel `IR[10:9]` as input or output.
  - Command 3 only sends the command.
- **INT** (`IR[17:13] = 11111`): `command[12:8] | mask[7:0]`. The command codes
  are set in `sic_pkg`:

  | code | name | action |
  |---|---|---|
  | 0 | LMI | MR ← mask |
  | 1 | LMA | MR ← AC |
  | 2 | LAM | AC ← MR |
  | 3 | MII | MR &= ~mask |
  | 4 | CLI | INTR &= ~mask |
  | 5 | EAI | enable interrupts |
  | 6 | DAI | disable interrupts |

The instruction-level model uses an older OPERATE code, taken from the original
single-event machine. It matches each 14-bit operate field as a whole, so the
rotates are RAL = `0x2000` and RAR = `0x3000`. All other codes are the same as
above.

The testbenches build instructions with the encoders in `tb/sic_asm.svh`: `mri`,
`opr`, `iocmd` and `intcmd`.

## Pin-level processor (`sic_b_cpu`)

A state machine performs one register transfer per clock. Memory answers in the
same clock: reads are combinational, and writes happen at the clock edge.

**Choosing what runs next.** Between instructions the processor serves, in this
order:

1. a pending buffered channel;
2. a pending interrupt;
3. otherwise, the next instruction fetch: `MA←PC`, `MD←M`, then `IR←MD, PC+1`.

**Instruction times in clocks,** fetch included:

| instruction | clocks |
|---|---|
| LAC, AND, TAD, DAC (direct) | 7 |
| ISZ, JMS | 8 |
| JMP (direct) | 5 |
| OPERATE | 6 |
| OPERATE with a taken SZL | 5 |
| HLT | 4 |

- Indirect addressing adds 2 clocks.
- Indexed addressing adds 1 clock.

**Interrupts.**

- A rising edge on `intline[i]` sets `INTR[i]`.
- When IR is loaded, intf is set to `|(INTR & MR) & enif`.
- Interrupt service:
  1. clears intf and enif;
  2. picks the highest pending unmasked line p;
  3. stores PC at `8 + 2p`;
  4. continues at `8 + 2p + 1`.
- The handler clears the request with CLI. It re-enables interrupts with EAI.

**I/O handshake.** Every I/O instruction first sends `IR[11:0]` on CSBUS with
`csrdy` and waits for `accept`. Data then moves on IOBUS (or status on CSBUS)
with three signals:

- `ready`: the receiver can take a word.
- `datavalid`: the sender has put its word on the bus.
- `accept`: the receiver took the word. The sender holds `datavalid` until it
  sees `accept`.

All shared lines are the OR of their drivers. Each driver outputs 0 when idle.

**Buffered channels.**

- A rising edge on `bcrdy[c]` requests one word on channel c.
- The channel's two-word descriptor is at `32 + 2c`:
  - word 0: the negative word count;
  - word 1: the end address. The word goes to `end + count`.
- Each request moves one word and raises `bufrdy[c]`. The processor then:
  1. adds one to the count;
  2. writes the count back;
  3. pulses `bufend` when the count reaches zero. The descriptor is not
     rewritten after the last word.
- BIOR sets the direction of each channel. An IB or OB instruction sets it.

## Multiplier device (`sic_io_mult`)

An example peripheral on the I/O lines.

- It accepts every command on CSBUS. It acts only on commands for its device
  number (1 by default).
- A data word sent to it starts its command: `DATA ← DATA × OLD`, `OLD ← DATA`,
  with the product cut to 18 bits.
  - So sending x twice leaves x² in DATA.
- While the command runs, its status is BUSY (1) for `CMD_CYCLES` = 5 clocks.
  It takes no new command until the status is DONE again. A processor that
  issues an I/O instruction meanwhile waits in the command handshake.

## Microprogrammed system (`sic_c_system`)

This is the hardest part of the design to follow.

### The microcycle

One microcycle is one clock:

1. **Rising edge:** the pipeline register (`sic_c_pipe`) takes the ROM word at
   the sequencer's address.
2. **High phase:** the fields of that word:
   - choose one A-bus source and one B-bus source;
   - set the ALU function;
   - choose the O-bus destination;
   - raise up to two strobes;
   - select the branch condition.
3. **Falling edge:** the destination register loads and the strobes act
   (memory writes also happen here). The sequencer (`sic_c_useq`) takes the
   next-address field if the condition holds, and otherwise the current
   address + 1.

Because of this, a condition on the ALU result (zero, negative, skip) tests the
value computed in the same microcycle.

### Microword (48 bits)

| bits | field |
|---|---|
| 47:39 | next address |
| 38:27 | condition: A select [2:0], B select [7:3], invert [8] |
| 26:24 | unused |
| 23:21 | A-bus source |
| 20:18 | B-bus source |
| 17:12 | O-bus destination |
| 11:9 | ALU function |
| 8:0 | strobes: A-group [3:0], B-group [7:4] |

The branch is `cc = invert ^ (A[selA] | B[selB])`:

- A bit 0 is always 0 and B bit 0 is always 1.
- Both selects 0 gives an unconditional jump.
- B select 6 (always 0) means "no branch".

**Codes.**

- **ALU functions:**
  - 0: A
  - 1: B
  - 2: ~A
  - 3: ~B
  - 4: A+B (carry in bit 18)
  - 5: A&B
  - 6: {A,lf} (left rotate)
  - 7: {lf,A} (right rotate)
- **A-bus sources:** 1 constant 1; 2 all ones; 3 interrupt vector
  8 + 2 × (highest line of INTR & MR); 4 buffer descriptor address
  32 + 2 × CC; 5 IR; 6 AC; 7 BWC.
- **B-bus sources:** 1 constant 1; 2 all ones; 3 MR; 4 MD; 5 IA; 6 IB; 7 PC.
- Codes A3, A4 and B3 are blank in the original bus table. Without them the
  datapath could not form the interrupt vector or the descriptor address, and
  could not read MR.
- **O-bus destinations:**
  - 1 IR; 2 IR address part;
  - 5 AC; 6 AC ← O[18:1] (completes a right rotate);
  - 7 MD; 8 IA; 9 IB; 10 PC; 11 BWC; 12 MA;
  - 13 CSR; 14 INTR &= O; 15 MR.
- **A-group strobes:**
  - memory: 1 write, 2 read;
  - handshake: 3 accept, 4 datavalid on, 5 datavalid off, 6 ready, 7 bufend;
  - bus drive: 10 MD onto IOBUS, 11 CSR onto CSBUS with csrdy.
- **B-group strobes:**
  - I/O registers: 1 CSR←CSBUS, 2 MD←IOBUS;
  - buffer channel: 3 BIOR set, 4 BCR clear, 5 BCR set, 6 BUFRDY, 7 CC+1;
  - interrupt flags: 8 intf off, 9 enif off, 10 enif on;
  - link: 11 lf off, 12 lf on, 13 lf←O[0], 14 lf←O[18];
  - 15 intf ← pending & enif.
- **A-group conditions:**
  - 1 accept, 2 datavalid, 3 ready;
  - 4 status compare `|(IR[5:0] & CSR[5:0])`;
  - 5 BCR[CC], 6 BIOR[CC].
- **B-group conditions:**
  - 1 any BCR; 2 intf;
  - ALU result: 3 O=0, 4 O<0, 5 O>0;
  - 7 lf;
  - 8 OPERATE skip (the event-3 test on O);
  - instruction bits: 9 opcode 7, 10 IR17&IR16, 11..26 IR[2..17].

### Microprogram

The ROM contents come from the function `ucode()` in `sic_c_ucode_pkg`. The
routines are:

**Fetch and dispatch.**

| routine | microcycles | what it does |
|---|---|---|
| `FETCH` | 4 | `MA←PC` (branch to `BSCAN` if any buffer channel is requesting); read into MD (branch to `ISR` if intf is set); `IR←MD` and update intf; `PC←PC+1`, and branch to `OPR` if the opcode is 7 |
| address type | 1–3 | direct; `IND` reads the address word; `IDX` and `IDXB` add IA or IB into the IR address |
| `EXEC` | 2–3 | a branch tree on IR17..15 |

**Memory reference.**

| routine | what it does |
|---|---|
| `LAC`, `AND`, `TAD` | read, then AC ← MD, AC&MD or AC+MD (TAD's carry goes to the link) |
| `ISZ` | read, MD+1, write; branches to `SKIP` if the result is 0 |
| `DAC` | AC → MD, then write |
| `JMS` | PC → MD, write, then PC ← address+1 |
| `JMP` | PC ← address |

**OPERATE.**

| routine | what it does |
|---|---|
| `OPR` | TST, I/O and INT instructions branch to `IOINT`; otherwise event 1 (`STL`, `L1X` clears the link or halts, `ACOP`, `STA`, `CMA`, `ROTn`/`RRn`) |
| `EV2` | SZL, DFA, DFB, DTA, INA, DTB, INB |
| `EV3` | rotate, or the skip test (`SK3`) |

**I/O and interrupt control.**

| routine | what it does |
|---|---|
| `IOINT` | TST is a no-op; I/O goes to `IO`, INT to `INT` |
| `IO`, `IOCS` | CSR ← IR[11:0], then drive CSBUS with csrdy until accept |
| `IOBC` | command 3 ends here; command 2 with the input direction sets BIOR for the channel in CC |
| `IOOW`, `IOOA` | output: MD ← AC, wait for ready, raise datavalid (MD drives IOBUS while it is set), wait for accept, drop datavalid |
| `IOID` | data input: raise ready and copy IOBUS into MD until datavalid, then accept for one cycle and AC ← MD |
| `IOST` | status input: the same with CSR ← CSBUS, then skip if `IR[5:0] & CSR[5:0]` is not 0 |
| `INT` | LMI (MR ← IR[7:0]), LMA (MR ← AC), LAM (AC ← MR), MII (BWC ← ~IR, then MR ← BWC & MR), CLI (INTR ← INTR & ~IR), EAI, DAI |

**Interrupt and buffer service.** These run between instructions, entered
from the first two fetch microwords. Buffer service comes first.

| routine | what it does |
|---|---|
| `ISR` | BWC ← vector; clear intf; MA ← BWC; clear enif; MD ← PC; write; PC ← BWC + 1 |
| `BSCAN` | step CC until BCR[CC] is set |
| `BSV` | clear BCR[CC]; read the count (into BWC) and the end address from the descriptor; MA ← end + count; BWC + 1; pulse BUFRDY; then `BIN` or an output transfer, depending on BIOR[CC] |
| `BIN` | ready until datavalid (MD ← IOBUS); accept; write |
| output | read the word; wait for ready; datavalid until accept |
| `BEND` | if the count reached 0, pulse BUFEND (`BLAST`); otherwise write the count back and pulse BUFRDY |

The last ROM word (511) jumps to itself. This is the halt state; `uaddr = 511`
shows that the program has stopped.

The microprogram is about 155 words. Because the only BIOR strobe sets the
bit for the channel in CC, IB sets the channel in CC, not the one named in
the instruction. An output-direction buffer command sets nothing.

You can load another microprogram with the `INIT_FILE` parameter of
`sic_c_urom`. It takes a hex file with one 48-bit word per line.

## Where this design departs from or fills in the description

The first five choices are in the pin-level processor; the rest are in the
microprogrammed system and the instruction-level model.

1. **TAD** puts its carry in the link, following the register-transfer
   sequence. The instruction-level model leaves the link unchanged, as its own
   description does.
2. **JMS** stores the address of the next instruction and continues at the
   target + 1.
   - The register-transfer sequence would store one word further on.
   - The instruction-level description would continue at the target itself.
   - This design uses "PC at target, continue at target + 1" at all three
     levels.
3. **HLT** waits for `start` in the pin-level processor. It stops the
   instruction-level model (`running` falls). In the microprogrammed system it
   enters the halt loop. The instruction-level source treats it as a no-op.
4. **INT command codes** and the **TST** group are this design's own. The
   source names the INT instructions but gives neither their codes nor the
   INT/TST sequences.
5. **Edge capture.** Interrupt and buffer requests are captured on rising
   edges of their lines.
6. **Microprogrammed system:**
   - IR loads from the O bus. The connection list shows it loading from MD,
     which would leave no way to form indexed addresses.
   - O destination 6 (AC ← O[18:1]) was added so that right rotates can be
     completed.
   - Bus codes A3, A4 and B3 are blank in the original table. Here they carry
     the interrupt vector, the buffer descriptor address and MR. Interrupt
     service, buffer service, LAM and MII depend on them.
   - The whole microprogram is this design's own. The source gives only the
     microword format and the datapath.
7. **Reset.** Every register resets to zero asynchronously. The source has no
   reset.
8. **Clock.** The source's clock generator (150 ns high, 50 ns low) is not a
   module here. The clock is an input, and the testbenches use a 50 % duty
   cycle.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end test `tb/tb_sic_top.sv` runs all three systems at their default
parameters:

- **Instruction-level model:** a summing loop.
- **Pin-level system**, in order:
  1. sends an operand to the multiplier twice; the processor stalls while the
     device is busy;
  2. reads the product back;
  3. skips over a halt with ISZ;
  4. starts buffered input on channel 2, with the testbench acting as the
     device;
  5. takes an interrupt on line 2.
- **Microprogrammed system:** a memory-reference and OPERATE program, then
  a wait loop with interrupts enabled. The same pulse on line 2 enters the
  handler through the interrupt service microcode.

It counts each of these mechanisms and fails if any count stays zero: stall,
skip, buffer request, buffer word, buffer end, interrupt, device transfer, halt,
micro branch and micro skip.

To build and run it with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/sic_pkg.sv rtl/sic_c_ucode_pkg.sv tb/tb_sic_top.sv \
  --top-module tb_sic_top -o sim
./obj_dir/sim
```

Verilator finds the modules through `-Irtl`. `-Wno-fatal` keeps its width
warnings on testbench comparisons from stopping the build. For any other
testbench, replace the last file and the `--top-module` with its name.

Unit tests:

| testbench | what it checks |
|---|---|
| `tb_sic_b_cpu` | exact clock counts, every address type, interrupt entry, OD/ID/IS, buffered input and output |
| `tb_sic_a_cpu` | every instruction of the instruction-level model, including the number of instructions executed |
| `tb_sic_c_system` | the microprogram on an MRI/OPERATE program; I/O with the multiplier device, including a stall; LMI, EAI, LAM and MII; two buffered input words on channel 0 and one output word on channel 1; interrupt service on line 2 |
| leaf-part testbenches | random stimulus against reference models |
