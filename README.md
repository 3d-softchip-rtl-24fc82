# 3D-SoftChip in SystemVerilog

3D-SoftChip is an adaptive computing system in which two dies are stacked on top of each other.

- The lower die, the **CAP** (configurable array processor), holds an array of small 4-bit processing elements (PEs).
- The upper die, the **ICS** (intelligent configurable switch), holds everything that keeps those PEs busy:
  - a 32-bit control processor;
  - program memory and data memory;
  - a pair of frame buffers;
  - a DMA engine;
  - one switch block per group of four PEs.

A dense array of vertical bumps joins the two dies, so every PE can receive its own instruction and data every clock. Four such stacked *unit chips* form the complete system.

The central idea is that the array is not fixed in word length or in programming model:

- Neighbouring 4-bit PEs can be chained into 8-, 16- or 32-bit words.
- The four unit chips can run the same program (massively parallel SIMD), different programs (multithreaded), or successive stages of one computation that pass data along (pipelined).

This repository is a synthesizable RTL model of that system, with a self-checking testbench for every block.

## Hierarchy

```
softchip_top                four unit chips, host load ports, link ring, array edges
└── unit_chip (x4)          one ICS die over one CAP die
    ├── ics_risc            32-bit control processor with loop buffer
    ├── ics_io              memory-mapped I/O registers of the processor
    ├── prog_mem            banked program memory (host write, fetch read)
    ├── data_mem            data memory, byte/half/word port + DMA word port
    ├── frame_buffer        two ping-pong frame buffers
    ├── dma                 block copy data memory <-> frame buffer
    ├── switch_block (x4)   per-quad instruction/data distribution
    └── cap_array           4 quads = 16 PEs, 4x4 mesh, word-length chain
        └── quad_pe (x4)    2 standard PEs + 2 accelerator PEs
            ├── spe (x2)
            └── pape (x2)
```

`pe_pkg` holds the PE instruction format and opcodes. `ics_pkg` holds the processor instruction set and I/O map.

## The processing elements

Every PE executes one 19-bit instruction per clock (unless it is a bit-serial multiply). The fields are:

| bits  | field     | meaning |
|-------|-----------|---------|
| 18    | WS_en     | write the result into the local SRAM word selected by bits 15:12 |
| 17    | WR_en     | write the result into the register selected by bits 11:10 |
| 16    | SRAM_en   | enable the local SRAM |
| 15:12 | SRAM_sel  | SRAM word address (16 words) |
| 11:10 | REG_sel   | register number (4 registers) |
| 9     | DOUT_ld   | load the result into the output register |
| 8:6   | OP        | operation |
| 5:3   | MUX_B     | source of operand B |
| 2:0   | MUX_A     | source of operand A |

Each operand mux chooses one of eight sources:

| code | source |
|------|--------|
| 0 | data-bus lane from the switch block |
| 1 | west neighbour |
| 2 | east neighbour |
| 3 | north neighbour |
| 4 | south neighbour |
| 5 | the selected register |
| 6 | the selected SRAM word |
| 7 | the PE's own output register |

`pe_pkg::pe_instr()` builds an instruction word.

**Standard PE (`spe`)** is a 4-bit ALU. It has eight operations: AND, OR, XOR, ADD, SUB, SPMUL, COMP and ABS.

- COMP returns `{0, gt, lt, eq}` for an unsigned comparison.
- ABS treats A as two's complement.
- SPMUL is a bit-serial unsigned multiplier. It takes 4 clocks and holds `busy` high for 5 clocks starting with the issuing clock. While it runs, the PE must not be given another instruction; an assertion checks this. The low half of the product is the result, and the high half is visible on `mul_hi`.

**Accelerator PE (`pape`)** has a signed 4x4 parallel multiplier and an 8-bit output register that doubles as the accumulator. Its operations are:

- PAMUL: `out = A*B`
- MAC: `out = A*B + out`
- MAS: `out = A*B - out`
- LSL, LSR, ASR, ROR: shift the output register by B
- ABS

All of these take one clock. The registers and SRAM are 8 bits wide; when used as an operand, their low nibble is taken.

**Quad (`quad_pe`)** places the two standard PEs in the left column and the two accelerator PEs in the right column. When `sh16_en` is set for a quad, its two accelerator PEs act as one 16-bit barrel shifter. The top PE holds the low byte.

## Word-length chaining

The eight standard PEs of a unit chip form a chain, numbered k = 2*quad + row. `ARRAY[1:0]` (`wl_mode`) cuts the chain into words:

| wl_mode | word length | PEs per word |
|---------|-------------|--------------|
| 0 | 4 bits | 1 |
| 1 | 8 bits | 2, one quad |
| 2 | 16 bits | 4, two quads |
| 3 | 32 bits | all 8 |

Inside a word, three signals pass from the lower slice to the upper one:

- the carry, for ADD and SUB;
- the compare flags, for COMP;
- the sign, for ABS.

Each slice knows from `wl_lsb` and `wl_msb` whether it starts or ends a word. The lowest slice injects the carry (1 for SUB). The highest slice decides the final compare result and the sign, and passes them back down the chain.

The chain is combinational across the whole word, so a 32-bit ADD still completes in one clock. Logic operations need no chaining. SPMUL always works on 4 bits.

To add two 32-bit numbers:
1. Load each nibble of the first number into the data-bus lanes of the standard PEs, one lane per slice, and store it to a register.
2. Do the same with the second number and issue ADD(BUS, REG) to all quads.
3. Read the eight result nibbles back with PERD.

## Switch block

There is one switch block per quad. It holds:

- a 4-lane data bus (one 4-bit lane per PE);
- an enable mask (which PEs execute);
- a broadcast bit (whether a PEBUS write fills all lanes with lane 0).

A PE instruction sent by the processor is registered once. It reaches the selected PEs one clock after the PEI, as a one-cycle valid pulse. The selection is the PE-type mask of the PEI combined with the quad's enable mask.

Each PE also has four 19-bit instruction registers, kept here in the switch block:
- PEST writes an instruction into one of them, in every selected PE, without executing it.
- PEX starts, in every selected PE, whatever that PE holds in the named register.

Storing different instructions into the same register of different PEs and then issuing one PEX makes the array run several instructions at once (MIMD). The timing of PEX is the same as a PEI.

The read-back word of a quad is `{8'b0, pa1, s1, pa0, s0}`:

| bits | PE |
|------|----|
| 3:0 | top standard PE |
| 11:4 | top accelerator PE |
| 15:12 | bottom standard PE |
| 23:16 | bottom accelerator PE |

## Control processor (`ics_risc`)

### Instruction format

Every instruction is one 32-bit word:

| bits | field |
|------|-------|
| 31:26 | opcode |
| 25:21 | rd |
| 20:16 | rs |
| 15:11 | rt |
| 15:0 | imm16 |

There are 32 registers, and r0 always reads zero.

### Instructions

| instruction | action |
|---|---|
| ADD SUB AND OR XOR | `rd = rs op rt` |
| ADDI | `rd = rs + sext(imm)` |
| LUI | `rd = imm << 16` |
| SLL / SRL | `rd = rs << imm` / `rd = rs >> imm` |
| LW LH LB / SW SH SB | load or store the word, half-word or byte at `rs + sext(imm)`; for stores, the data is rd |
| BEQ / BNE | branch if rd == rs / rd != rs; target is relative to the next word |
| JMP | absolute word address |
| LOOP rs, n | run the next n+1 words R[rs] times |
| PEI | issue a PE instruction: [25:22] quad mask, [21:20] PE types (bit 0 standard, bit 1 accelerator), [18:0] the instruction |
| PEBUS | write rs[15:0] to the data-bus lanes of the quads in imm[3:0] |
| PERD | rd = read-back word of quad imm[1:0] |
| SBCFG | write rs[4:0] to the switch-block configuration (broadcast bit, enable mask) of the quads in imm[3:0] |
| PEST rs | store rs[18:0] into PE instruction register imm[7:6] of the PEs of quads imm[3:0], types imm[5:4] |
| PEX | start the stored instruction imm[7:6] in the PEs of quads imm[3:0], types imm[5:4] |
| HALT | stop until reset |

`ics_pkg` has encoder functions `enc_r`, `enc_i`, `enc_pei` and `pe_sel` (the PEST/PEX immediate) for writing programs in a testbench.

### Address map

Loads and stores use byte addresses. Only bits 15:14 select the region, so an address formed with `ADDI r, r0, 0x8000` (which sign-extends to 0xFFFF8000) reaches the I/O registers.

| address | region |
|---|---|
| 0x0000-0x3FFF | data memory |
| 0x4000-0x7FFF | frame buffer, processor side (the buffer not selected for DMA) |
| 0x8000 + 4*i | I/O register i |

The I/O registers:

| i | name | write | read |
|---|---|---|---|
| 0 | DMA_SRC | source word address | |
| 1 | DMA_DST | destination word address | |
| 2 | DMA_LEN | length in words | |
| 3 | DMA_CTRL | bit0 start, bit1 direction (0: data memory to frame buffer) | busy |
| 4 | FB_SWAP | swap the two frame buffers | selected buffer |
| 5 | PBANK | program bank used by instruction fetch | |
| 6 | LINK_OUT | send a word to the next unit chip | ready |
| 7 | LINK_IN | | received word (empties the mailbox) |
| 8 | LINK_ST | | mailbox full |
| 9 | ARRAY | [1:0] word-length mode, [5:2] 16-bit shifter per quad | |

### Pipeline and hazards

There are three stages: fetch, decode and execute.

**Registers.** Registers are read and written in execute, so a result is visible to the very next instruction without forwarding.

**Branches.** Taken branches, JMP and LOOP resolve in execute and discard the two younger instructions.

**Bank switch.** A PBANK write takes effect for the next fetch. The usual sequence is `SW PBANK` followed directly by `JMP target`: the word fetched after the JMP is discarded, and the jump target is fetched from the new bank.

**Stalls.** The processor stalls in execute in two cases:
- a PEI while any PE is busy with a serial multiply;
- a PERD while results of earlier PE instructions have not yet reached the PEs, which is one clock when the PERD directly follows a PEI.

### Loop buffer

The buffer holds 16 words. LOOP runs the body in two phases:
1. During the first pass, fetch copies the body into the buffer.
2. The remaining passes are fed from the buffer with no program-memory access (`imem_fetch` low).

Loop bodies must not contain branches, LOOP or HALT.

## Data movement

**Data memory** (`data_mem`) is 1024 words of 32 bits.
- The processor port reads and writes bytes, half-words or words.
- The DMA port moves whole words.

**Frame buffers** (`frame_buffer`) are two buffers of 64 words each, used ping-pong: DMA fills one while the processor works on the other, and FB_SWAP exchanges them.

**DMA** (`dma`) copies one word per clock, in either direction.

## The four unit chips (`softchip_top`)

**Placement.** The unit chips sit in a square:

| | left | right |
|---|---|---|
| top | unit 1 | unit 2 |
| bottom | unit 4 | unit 3 |

Their 4x4 PE arrays are joined at the shared edges, so the whole system is an 8x8 mesh of PEs. Its outer edges are ports: `edge_{w,e,n,s}_{in,out}`, eight lanes each.

**Link ring.** A one-word mailbox link runs 1 → 2 → 3 → 4 → 1. This carries the pipelined model. The sender polls LINK_OUT for ready; the receiver polls LINK_ST and then reads LINK_IN.

**Host ports.** Each unit chip runs while its `run` bit is high, and its processor is held in reset while the bit is low. Meanwhile the host writes program memory and data memory through the `host_pm_*` and `host_dm_*` ports. Their `*_units` masks write several unit chips at once, so loading the same program everywhere (massively parallel model) takes no longer than loading one.

**Programs per unit.** Different programs per unit chip (multithreaded model) are loaded with one-hot masks. A program can change its own bank at run time with PBANK.

**Status outputs.** For monitoring, the top also brings out `halted`, `imem_fetch`, `ics_stall`, `pe_busy` and `dma_busy` for each unit chip.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_softchip_top \
    rtl/pe_pkg.sv rtl/ics_pkg.sv $(ls rtl/*.sv | grep -v _pkg) tb/tb_softchip_top.sv
./obj_dir/Vtb_softchip_top
```

The two packages must come first.  For a block testbench, name it as the
top module and give its file instead.

The block testbenches are:

| testbench | what it covers |
|---|---|
| `tb_spe` | every operation on random operands, 8/16/32-bit chaining of ADD/SUB/COMP/ABS, serial-multiply latency |
| `tb_pape` | every operation, including MAC/MAS sequences, 16-bit shifter pairs, register and SRAM operands |
| `tb_quad_pe` | mesh links, 8-bit chaining and the 16-bit shifter inside a quad |
| `tb_cap_array` | the full 16-PE array in all word-length modes, shifts across quads |
| `tb_switch_block` | enable and type masks, stored instructions, lane loading, broadcast |
| `tb_ics_risc` | arithmetic, branches, loop-buffer replay (no fetches during replay), stalls, cycle count |
| `tb_ics_risc_pe` | PEST/PEX fields, PEX waiting for a busy array, PERD waiting after PEX but not after PEST |
| `tb_prog_mem`, `tb_data_mem`, `tb_frame_buffer`, `tb_dma` | memories and DMA, including one word per clock |
| `tb_unit_chip` | one unit chip running a program: DMA, frame-buffer swap, a 32-bit add, a serial multiply with the resulting stall, a loop, the link |
| `tb_softchip_top` | all four unit chips at the default sizes |

`tb_softchip_top` works in these steps:
1. It broadcasts two programs into banks 0 and 1 of every unit chip, and gives each unit its own operands.
2. In bank 0 the units run a DMA, a frame-buffer swap, a 32-bit add and a link transfer around the ring. A serial multiply stalls the following PE instruction.
3. The units switch to bank 1 at run time.
4. Bank 1 runs a MAC loop from the loop buffer, a 16-bit paired shift, and a move that takes data from the neighbouring unit chip's PEs. It then stores OR into the standard PEs and PAMUL into the accelerator PEs, and starts both with one PEX.

It counts DMA clocks, stall clocks, serial-multiply busy clocks and loop-buffer replay clocks, and fails if any is zero. It takes about 110 clocks.

## Where this model departs from the original description

The architecture description defines the PEs, their instruction format and operation tables, and the block structure of both dies. It leaves many details open. The following are choices of this model:

- **Processor.** The whole instruction set, encoding, I/O map, branch timing and stall rules are invented. Only the three pipeline stages, 32 registers and a 16-entry loop buffer are given.
- **Word-length chaining.** The original builds this into scalable arithmetic primitives that are not described in detail. Here only the standard PEs chain, and only for ADD, SUB, COMP and ABS; SPMUL stays 4-bit. The accelerator PEs stay at 4x4 → 8 bits, except for the paired 16-bit shifter.
- **PE details.** The original does not give:
  - the serial multiplier's timing;
  - that SPMUL and COMP are unsigned;
  - the register and SRAM widths (8 bits in the accelerator PEs);
  - the SRAM depth (16).
  MAS is built literally as `A*B - out`.
- **Instruction registers.** Each PE is described as having four sets of 19-bit registers for instruction decoding, without saying how they are loaded or selected. This model keeps them in the switch block, one set per PE, and fills and starts them with PEST and PEX.
- **Switch blocks.** These are described as pass-transistor networks with 6-, 7- and 8-sided variants. Here they are one logical block of ordinary multiplexers and registers. The second-level switch-block mesh is represented only by the joined PE array edges.
- **Memory sizes** are assumed:
  - two program banks of 256 words;
  - 1024 data words;
  - two frame buffers of 64 words.
- **Vertical bump array.** It has no logic function and appears only as wires between the switch blocks and the PE array.
- **Between the unit chips.** The link ring, host ports and run/reset control are this model's own.
- **Not built.** The processor is said to have special addressing modes, but they are never defined, so only base + offset addressing exists. Likewise, no word-length-scalable multiply exists: the standard PE's serial multiplier and the accelerator's 4x4 multiplier do not chain into wider words.
