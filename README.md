# Two motion-estimation co-processors: a pattern-table engine and a small ASIP

Block-matching motion estimation finds, for each 16x16 macroblock (MB) of the
current frame, the displaced 16x16 block of a reference frame that is most
alike. "Most alike" means the smallest sum of absolute differences (SAD). The
displacement found is the motion vector (MV).

A full search tries every candidate in the search window. Fast algorithms try
only a few, in steps:
- three-step search (3SS)
- diamond search (DS)
- data-adaptive ones such as MVFAST

Which algorithm is best depends on the battery, the bandwidth and the video.
Both co-processors here let the host change the algorithm without new
hardware:

* **Architecture A** (`me_system_a`) is a fixed datapath. A lookup table,
  the pattern memory, describes the algorithm as a list of candidate
  displacements with step and end flags. A small state machine walks the
  table. It computes 8 absolute differences per clock, so one candidate
  costs 32 clocks. It handles every algorithm whose steps are fixed lists of
  points (full search, 3SS, DS and similar). It does not handle algorithms
  that choose points from data.
* **Architecture B** (`asip`) is a 16-bit processor with eight instructions
  made for motion estimation. The search is a program, so any algorithm can
  run, including data-adaptive ones. Its SAD unit is serial (one pixel pair
  per clock), so it is slower per candidate.

`me_top` holds both side by side. Each has its own ports.

## Architecture A: table-driven search

### The pattern table

Each entry of the pattern memory (`pattern_memory`, 4 sets x 256 entries,
`me_a_pkg::patt_entry_t`) has these fields:

| field  | meaning |
|--------|---------|
| dx, dy | candidate displacement relative to the current search centre (signed 8 bit) |
| raster | the same displacement as a byte offset, `dy*width + dx`, written by the host for its frame width |
| StE    | step end: this is the last candidate of the step |
| SeE    | search end: this is the last candidate of the search |
| NPA    | next pattern address: where the next step starts if this candidate wins its step |

A step is a run of consecutive entries ending in StE. At the end of a step:
1. The centre moves by the winner's (dx, dy).
2. The table jumps to the winner's NPA.

So a 3SS table can send each of the 9 winners to the same next step. A DS
table can send each winner to a continuation pattern that depends on the
direction it moved. This is how a branching search is written as data.

`sel_pat` picks one of the four sets. Switching algorithm is one register
write.

### Search decision unit (`sdu`), the part to read first

A seven-state machine runs the search:

| state | what happens |
|-------|--------------|
| IDLE | waits for go |
| LOAD | computes the MB address, clears the accumulators, loads PA from 0 |
| RUN  | scans one candidate, 32 clocks |
| SKIP | a candidate not wholly inside the frame costs 2 clocks and no SAD |
| LAST | waits for the SAD pipeline to drain |
| STEP | moves the centre and loads the next pattern address |
| DONE | holds the result |

Rules worth knowing:

- **Update rule.** A candidate replaces the stored best when its SAD is
  *less than or equal to* the stored minimum. With equal SADs, the later
  entry in the table wins. Put the centre first in a step if you want ties
  to move away from it. Put it last to make ties stay.
- **Minimum across steps.** The smallest SAD is kept from one step to the
  next.
  - If no candidate of a step beats it, the centre stays where it is.
  - The table then continues at the NPA of the step's *last* entry. This
    stops a pattern that omits its centre from jumping back to an earlier
    step.
- **Frame borders.** A candidate is checked in the row/column domain
  against the frame width and height before any memory access.
- **Timing.**
  - Overall: `2*skipped + 32*valid` clocks plus a few clocks per step.
  - The SAD of a candidate arrives 3 clocks after its last address.
  - The next candidate's scan overlaps that wait.
  - A 256-point full search takes 8200 clocks.

### Address generation and memories

- **AGU (`agu_a`).** Contains three parts:
  - the PA counter (`pattern_generator`);
  - the table;
  - a 16-line x 2-group scan counter (`mb_pattern_scan`).

  It produces two addresses every clock:
  - candidate address = step base + raster + line*width + group*8;
  - current-MB address = MB base + line*width + group*8.
- **Frame memories (`frame_memory`).** There are two, 1 MB each:
  - one holds the current frame;
  - one holds the reference (search) frame.

  Each is built from 8 byte-wide banks. Any 8 neighbouring pixels, aligned
  or not, come out one clock after the address.
- **SAD unit (`sadu_a`).**
  - The first candidate of a search reads the current MB from memory and
    copies it into a 32 x 64-bit cache.
  - Later candidates read the cache.
  - It has two register stages: the 8-way sum, then the accumulator.

### Host interface (`host_regfile_a`)

There are four 64-bit registers:

| reg | bits | content |
|-----|------|---------|
| 0 | [0] core reset, [1] enable, [2] go (self-clearing), [5:4] sel_pat | control |
| 1 | [15:0] width, [31:16] height, [47:32] MB x, [63:48] MB y | geometry, in pixels |
| 2 | [7:0] mv_x, [15:8] mv_y, [31:16] SAD, [32] done | result; captured when the search ends, done cleared by go |
| 3 | [9:0] table address, [10] SeE, [11] StE, [19:12] NPA, [27:20] dx, [35:28] dy, [55:36] raster | writing it writes one table entry |

Frames are written through `fm_we/fm_sel/fm_waddr/fm_wdata`:
- one 64-bit word of 8 pixels per write;
- the lowest address is in bits 7:0;
- `fm_sel` 0 selects the current frame, 1 the search frame.

The MV is relative to the MB position, in pixels. A positive x means the
matching block lies to the right.

## Architecture B: the motion-estimation ASIP

### Programmer's model

There are 24 registers of 16 bits, R0..R23. R16..R23 are special:

| reg | use |
|-----|-----|
| R16 | frame width |
| R17 | frame height |
| R18 | MB x |
| R19 | MB y |
| R20 | MV output: writing it sends [7:0] then [15:8] to the data port |
| R21 | search range p (at most 8) |
| R22, R23 | free |

Instructions are 16 bits, with the opcode in [15:13]:

| op | mnemonic | fields | action |
|----|----------|--------|--------|
| 000 | LD t | t=[12] | load into on-chip memory: t=0 the 16x16 current MB at (R18,R19), t=1 the (16+2p)^2 search area around it; runs in the background |
| 001 | J cc, addr | cc=[12:11], addr=[9:0] | jump if cc: 00 always, 01 negative, 10 zero, 11 positive |
| 010 | MOVR rd, rs | rd=[12:8], rs=[4:0] | copy; the 5-bit fields reach every register |
| 011 | MOVC t, rd, k | t=[12], rd=[11:8], k=[7:0] | write k into the low byte (t=0) or high byte (t=1) of rd, keeping the other byte |
| 100 | SAD16 rd, rs1, rs2 | [11:8], [7:4], [3:0] | rd += SAD of one 16-pixel line; rs1 += 0x0100 (next line) |
| 101 | DIV2 rd, rs1 | | rd = rs1 >>> 1 |
| 110 | ADD rd, rs1, rs2 | | rd = rs1 + rs2 |
| 111 | SUB rd, rs1, rs2 | | rd = rs1 - rs2 |

Flags: N and Z are set by ADD, SUB, DIV2 and SAD16.

SAD16 coordinates are in the search-area scratchpad (32 x 32 bytes):
- rs1 = {y, x} of the candidate line being processed;
- rs2 = {y0, x0} of the candidate block's origin;
- the MB line used is y - y0.

Sixteen SAD16 instructions with the same rs2 give the SAD of a whole
candidate, because each one moves rs1 down a line.

`tb/asip_tb_pkg.sv` has a small assembler and a full-search program. It
also shows how a borrow in packed {y,x} arithmetic is corrected.

### Micro-architecture

The processor has two stages: fetch, then execute.
- The program memory's output register is the instruction register.
- A taken jump costs one bubble.

Interlocks (stalls):
- **LD** waits while an earlier LD or an MV output is running. Otherwise LD
  only starts the load unit (`agu_b`), and the program goes on. A program
  can so load the next block while it computes on the current one.
- **SAD16** holds the pipeline for its 16 clocks (`sadu_b`, P=1 pixel per
  clock). Its two results are written together:
  - the SAD to rd through write port A;
  - rs1 + 0x100 to rs1 through write port B.
- **MOVR to R20** waits until both the load unit and the port are free.

### External port and memory map (`asip_io`)

The port has these signals:
- `addr` (20 bit);
- data in/out (8 bit) with `data_oe`;
- `#oe_we` (0 read, 1 write);
- `req`/`gnt` for the shared bus.

A read returns data one clock after the address. After `gnt` rises, one
address can be issued per clock.

| address | content |
|---------|---------|
| 0x00000 | current frame, raster order, `width` bytes per line |
| 0x80000 | reference frame |
| 0xFF7FE, 0xFF7FF | MV output: mv_x, then mv_y |
| 0xFF800..0xFFFFF | firmware image, 1024 little-endian words |

Each MV byte written toggles `done`.

**Programming mode** starts when `rst` and `en` are both high on a clock
after they were not:
- The port reads all 2048 bytes of the firmware into the program memory, in
  at least 2048 clocks.
- When it has finished, `prog_mode` falls.
- Lowering `rst` then starts the program from address 0.

## Where this design departs from, or fills in, the original description

Followed as published:
- the pattern-table fields and step/search-end mechanism;
- 8 pixels per clock and 32 clocks per candidate in A;
- a seven-state decision FSM;
- the instruction set and its 16-bit encoding (eight instructions in four
  categories, a conditional jump on the result of the last arithmetic or
  SAD16 operation);
- SAD16 updating the line coordinates;
- a serial SAD unit of 16 clocks per line;
- LD overlapped with execution;
- the 20-bit/8-bit port with `#oe_we` and a toggling `done`;
- programming mode entered with rst and en high and left after 2 kB.

Choices made here, because the description does not fix them:
- The values of the jump condition codes and the `#oe_we` polarity.
- The special-register numbering. The original text counts "24 general and
  8 special" registers, which conflicts with 4-bit register fields and a
  drawing of R0..R23. This design has 24 registers in all, the top eight
  special.
- Where the firmware, the frames and the MV output live in the 1 MB space.
- The less-or-equal update rule. The published equations take the minimum
  with less-or-equal, while the prose says "smaller". This design follows
  the equations.
- The fall-back NPA when a step brings no improvement.
- The host register map of A.
- Eight memory banks in place of alignment logic in the SAD unit.
- A cache of the current MB (the original text speaks of caching candidate
  data).
- The SAD pipeline depth.
- The req/gnt bus handshake.

Not built:
- The host CPU, its buses, the DMA engine and the external RAM with its
  controller. Their signals are ports of `me_top`. `tb/ext_ram_model.sv` is
  a behavioural RAM and arbiter for simulation.
- MVFAST, both as a pattern table (it cannot be one) and as firmware. Only
  a full-search program was written and tested for B.
- FPGA clock rates and area. Simulation cannot confirm them. In clocks:
  - A full search on A takes about 8.2 k clocks per MB.
  - A full search on B takes 16 clocks x 16 lines per candidate plus loop
    overhead.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --top-module tb_me_top -y rtl -y tb +libext+.sv \
  rtl/me_a_pkg.sv rtl/asip_pkg.sv tb/me_tb_pkg.sv tb/asip_tb_pkg.sv tb/tb_me_top.sv \
  --Mdir obj -o sim && obj/sim
```

`tb_me_top` runs both co-processors at full size, at the same time, on a
QCIF (176x144) frame pair. The reference frame is the current frame moved
by (3, -2) with added texture.

Architecture A:
- loads the frames and four tables (full search, 3SS, DS, and a 9-point
  example);
- runs six searches while switching tables, at inner, corner and edge MBs;
- checks each result against a software model of the table walk.

Architecture B:
- uploads a full-search program and runs it;
- checks the MV bytes against a software full search.

The test counts each mechanism and fails if any never happened:
- skipped border candidates, step ends, search ends;
- cache fill and reuse, algorithm switches;
- the upload, LD overlap, SAD16 stalls;
- taken and not-taken jumps, bus waits, `done` toggles.

`tb_me_system_a` and `tb_asip` are longer tests of each co-processor alone.
They also check cycle counts:
- 32 clocks per valid candidate and 2 per skipped one;
- 16 clocks per SAD16;
- a 2048-clock upload.

The unit testbenches drive each block with random stimulus and compare it
with a model written in the testbench.

The assertions in `sdu` and `asip_io` check handshake rules. Verilator
reports SYNCASYNCNET on their `disable iff` reset terms. The warning is
harmless: the reset is asynchronous by design.
