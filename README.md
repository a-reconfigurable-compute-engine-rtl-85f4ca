# DFFC: a data-flow array of coarse-grain operators for real-time video

The Data-Flow Functional Computer (DFFC) runs low-level vision algorithms on a
live video stream, one pixel per clock. It does not execute a program
sequentially. It spreads the algorithm's data-flow graph over a 3-D mesh of
small programmable data-paths. Every node of the graph is a data-path that
does one pixel's worth of work each cycle, and every edge is a FIFO-to-FIFO
link between neighbours.

The building block is a very coarse-grain FPGA, the **Field-Programmable
Operator Array (FPOA)**. An ordinary FPGA's cells are gates and flip-flops.
The FPOA's cells are whole 8/16-bit operators: a multiplier, a 2901-style
ALU, a 256-word RAM and counters, driven by a small state machine. Its routing
moves 9-bit words with a 1-bit acknowledge, not single bits. Because every
cell always runs at the same clock, whatever operator it holds, the speed of
an application does not depend on placement and routing.

This repository holds synthesizable SystemVerilog for the FPOA and the array
built from it, with self-checking testbenches for every module.

```
dffc            NB boards x (NX x NY) FPOAs   default 8 x 8 x 8 = 512 chips
 └ fpoa         one chip: two basic blocks stacked vertically, 6 scanpaths
    └ fpoa_block  1 CDP + 6 IOPs + input switch 6->3 + output switch 3->6
       ├ iop         one port: send / receive / feedback
       ├ in_switch   port -> input FIFO A, B, E (with replication)
       ├ out_switch  output FIFO C, D, F -> ports (with fan-out)
       └ cdp         Configurable Data-Path
          ├ cdp_fifo x6       8 x 9-bit stacks
          ├ cdp_controller    64 x 32-bit state machine
          ├ cdp_ram           256 x 9 data RAM
          ├ cdp_counter       CT: 2 x 8-bit, cascadable
          ├ cdp_shifter x3    SHA, SHB (8 bit), SHF (16 bit)
          └ cdp_alu           16-bit 2901-type ALU
scan_reg        configuration scanpath segment (used by fpoa)
dffc_pkg        shared types: words, links, configuration layouts, commands
```

## The mesh

A CDP has six ports, named North, South, West, East, Up and Down. In the array,
CDP (x, y, z) links to its neighbours at y-1, y+1, x-1, x+1, z-1 and z+1.

- An FPOA holds two CDPs, z = 2b and 2b+1. The Down port of the first is
  wired to the Up port of the second inside the chip. That leaves ten
  external ports per chip.
- Each board is a plane of NX x NY chips. Boards are stacked so that the
  Down port of the lower CDP on one board meets the Up port of the upper
  CDP on the next board.
- The default array has 8 x 8 chips on each of 8 boards, which is
  8 x 8 x 16 = 1024 CDPs.

All links are local; there are no long wires. To carry a flow a long way,
the CDPs in between are configured as routing lanes.

Ports on the outside of the mesh are the top's port arrays, one group per
face:

| face | position | array index |
|------|----------|-------------|
| `w_*` | x = 0 | `[y][z]` |
| `e_*` | x = NX-1 | `[y][z]` |
| `n_*` | y = 0 | `[x][z]` |
| `s_*` | y = NY-1 | `[x][z]` |
| `u_*` | layer 0 | `[x][y]` |
| `d_*` | last layer | `[x][y]` |

Camera inputs, monitor outputs, the host I/O controller, a transputer
network and RAM/LUT boards all connect at these faces. None of them is
modelled here.

### Links and the flow-control rule

A link carries `chan_t {valid, data[8:0]}` forward and one acknowledge bit
back. A word moves in a cycle where valid and ack are both high. Bit 8 of a
word marks a control token (beginning or end of a line or frame). Bits 7:0
carry a pixel. This design uses `'('` = 0x128 and `')'` = 0x129.

Physically each port is one bidirectional bus. Here it is two one-way
channels, and the port's mode enables one of them. The acknowledge never
depends on valid: it depends only on whether the receiving FIFOs have room.
This is what lets a sender qualify its valid with the acknowledges of all
its destinations without forming a combinational loop.

- **Replication (input switch).** One receiving port may feed one, two or
  all three input FIFOs. It is acknowledged only when all of them have room,
  and the word is then written into all of them at once.
- **Fan-out (output switch).** One output FIFO may feed up to six sending
  ports. Its head word is offered only in a cycle where all of them
  acknowledge, and is then popped once.
- **Feedback port.** A port in feedback mode sends an output FIFO's words
  straight back into an input FIFO of the same CDP.

## The Configurable Data-Path (`cdp`)

The CDP is where the work happens, and it is the hardest part to use. Three
input FIFOs (A, B, E) feed a three-stage pipeline, which fills three output
FIFOs (C, D, F). Every FIFO holds 8 words of 9 bits.

| stage | registers loaded | units |
|-------|------------------|-------|
| 1 issue | LA, LB, LE ← FIFO heads | state machine, FIFO decode |
| 2 8-bit | PA, PB (16 bit), QA, QB, QE (9 bit) | SHA, SHB, 8x8 multiplier (B = SHB or K8), data RAM read/write, CT counter |
| 3 16-bit | → output FIFOs | ALU(PA, PB), abs, min/max, SHF, output multiplexer |

Choices at the stage boundaries:

- PA takes 0, the multiplier, the RAM word (extended to 16 bits) or the
  previous ALU result. The last of these is used for accumulation.
- PB takes 0, SHB (extended), K16 or the ALU result.
- The 16-bit result is one of: ALU, PA, PB, |ALU|, SHF(ALU), min(PA,PB),
  max(PA,PB), or CT.
- SC receives the result's low byte and SD its high byte. Each byte gets a
  ninth bit, or is replaced by a token or a flag word, as the static
  register chooses: 0, 1, `(`, `)`, COUT or POS for SC; 0, 1, `(`, `)`,
  OVR or NULL for SD.
- A state can instead send QA to SC and QB to SD unchanged.
- SF always receives QE: the RAM word, or LE on a direct lane.

**Timing.** A word popped from an input FIFO in cycle t is in the output FIFO
after the edge ending cycle t+2. It reaches the neighbour's input FIFO one
edge later. That makes four cycles per basic block, and the testbenches check
it: 4 cycles link to link, 8 through an FPOA, 16 through four CDPs. When
inputs and room allow, a CDP executes one state per clock.

### State machine (`cdp_controller`)

Each cycle the current program word is checked. It **issues** only if:

- every input FIFO it pops, or whose head it tests, holds a word; and
- every output FIFO it pushes has room. Room means the words in the FIFO
  plus the words of earlier states still in the pipeline are fewer than 8.

If the word does not issue, the machine stays in its state and stage 2
receives a bubble. The pipeline itself never stalls, and a result always
finds a free slot.

Program word layout (`dffc_pkg::uword_t`, MSB first):

| bits | field | meaning |
|------|-------|---------|
| 31 | q_sel | SC/SD take QA/QB instead of the result |
| 30 | ct_load | load CT from KCT |
| 29 | ct_step | count CT down; at NULL, reload KCT |
| 28 | ram_we | write the data RAM |
| 27:25 | out_sel | result multiplexer |
| 24:23 | pb_sel | PB source |
| 22:21 | pa_sel | PA source |
| 20:18 | push | F, D, C |
| 17:15 | pop | E, B, A |
| 14:12 | cond | NEXT, TOKA/B/E (head is a token), NULL, EQ, GE, ALT |
| 11:6 | alt | successor when cond holds |
| 5:0 | next | successor otherwise |

The ALU function, carry in, shift amounts, the constants K8, K16 and KCT,
the RAM address and data sources, operand sign extension, the SC/SD tag
choice and the three direct-lane bits are all static. They live in
`cdp_static_t`, 75 bits.

**Direct lanes.** `direct_ac`, `direct_bd` and `direct_ef` pass lane A→C,
B→D or E→F through the L and Q registers on their own handshake, with no
program involved. A CDP can therefore route one flow while its program
computes on the others. A CDP used only for routing has the three bits set.
Its state machine is then held, so the program RAM contents do not matter.

Example programs, all exercised in `tb/tb_cdp.sv`:

- **Adder.** Static: K8 = 1, multiplier B from K8, ALU ADD. The single
  state pops A and B, sets PA to A·1 and PB to B, and sends the ALU result
  to C and D.
- **Pixel delay of N.** Static: KCT = N-1, RAM read and write addresses from
  CT. The single state pops E, writes RAM[CT] ← LE, sends the old RAM[CT]
  to F and steps CT.
- **Line sum.** This needs five states:
  1. Dispatch: branch on a token at the head of B.
  2. Accumulate: PA ← ALU (that is, PA+PB), PB ← pixel.
  3. Consume the token.
  4. Send PA.
  5. Clear.
- **Histogram.** Static: K16 = 1, RAM read address from LA, write address
  from LB, write data from the ALU. Each pixel arrives on both A and B
  (one port replicated into both FIFOs). State 0 pops the pair and loads PA
  with RAM[pixel] and PB with 1. State 1 pops nothing: while state 0's word
  is in the ALU, it writes PA+1 back at RAM[LB]. The next pixel reads the
  RAM a cycle after that write, so runs of one value count correctly. Rate:
  one pixel every two cycles.

## Configuration

An FPOA is controlled by a clock, a reset, a 4-bit command bus (`cmd_e`) and
a 1-bit scanpath. Inside the chip the scanpath splits into six paths.
For block k (0 or 1) of the chip:

| path | register | bits |
|------|----------|------|
| 3k | static programming register (`cdp_static_t`) | 75 |
| 3k+1 | port modes and switch matrices (`sw_cfg_t`) | 33 |
| 3k+2 | load register: enable, program/data, address, word (`load_t`) | 42 |

Commands:

| code | command | effect |
|------|---------|--------|
| 8+n | SELn | choose path n |
| 2 | SHIFT | move the chosen path by one bit; scan_out shows the bit leaving it |
| 3 | XFER | write every enabled load register into its program or data RAM |
| 4 | RESTART | state 0, FIFOs and pipelines emptied |
| 0 | RUN | execute |
| 1 | HOLD | stop issuing, let the pipeline drain |

In the array, every chip sees the same command bus, and the scanpaths are
daisy-chained in chip order `(board*NY + y)*NX + x`. To load one path
everywhere:

1. Shift in the value for the last chip first, most-significant bit first.
2. Continue chip by chip down to chip 0.

The same path is selected in every chip at once.

To load a program, set the load registers of every CDP that needs that
address, then issue XFER; repeat for each address. The task `shift_path` in
`tb/dffc_e2e.sv` is a working example.

## Where this RTL departs from the architecture it implements

- **RAM loading.** Program and data RAM words are written from a load
  register on the scanpath. The original loads the RAMs by filling the
  input FIFOs over the scanpath and then transferring their contents.
- **Scan coverage.** Only configuration registers are on the scanpaths.
  The original also chains FIFOs, counters and pipeline registers, for test
  and debug. Here those cannot be read out.
- **Configuration size.** A CDP has 150 configuration bits besides its
  RAMs. The original needs 5147 bits per CDP, RAMs and FIFOs included.
- **Encodings.** These were all chosen for this design: the
  command codes, the contents of the six paths, and the layouts of the
  program word, static register and switch register.
- **Links.** The forward valid bit is an addition: the original link is 9
  data bits plus an acknowledge. The bidirectional bus is modelled as two
  one-way channels.
- **Choices the original leaves open:**
  - branching by an `alt` successor and a condition;
  - the multiplexer inputs of PA, PB and the result;
  - the token codes;
  - down-counting with auto-reload for CT;
  - read-before-write in the data RAM;
  - unsigned min/max;
  - the port-to-face geometry of the mesh.
- **Histogram width.** The histogram bins are 8-bit RAM bytes, so a bin
  wraps after 255 counts. A 16-bit histogram would need a two-word
  program; that has not been written.
- **Not modelled.** Electrical and physical data (the 25 MHz clock, the
  package and the die) are outside the RTL.

## Simulating

Each module has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dffc_pkg.sv tb/dffc_tb_pkg.sv tb/dffc_e2e.sv tb/tb_dffc.sv \
    --top-module tb_dffc -Mdir obj_tb_dffc
./obj_tb_dffc/Vtb_dffc
```

Module files are found through `-Irtl -Itb`. Packages must be listed first.

The testbenches:

- **Leaf modules** (`tb_cdp_fifo`, `tb_cdp_alu`, `tb_cdp_counter`,
  `tb_cdp_shifter`, `tb_cdp_ram`, `tb_scan_reg`, `tb_iop`, `tb_in_switch`,
  `tb_out_switch`, `tb_cdp_controller`) compare against reference models
  with random stimulus.
- **`tb_cdp`** runs the operators listed above. It also checks the 3-cycle
  FIFO-to-FIFO latency, one result per clock, and that a full output FIFO
  stops the program without losing words.
- **`tb_fpoa_block`** checks replication, fan-out, the feedback port and
  random back-pressure.
- **`tb_fpoa`** configures one chip entirely through its scanpath. It checks
  the in-chip link, the 8-cycle latency, scan read-back and HOLD.
- **`tb_dffc`** is the end-to-end test on a 2 x 2 x 2-chip array. It builds
  a small graph (routing, adder, replication, fan-out, feedback, in-chip and
  board-to-board links) with random acknowledges on the outputs. It checks
  every word and latency, HOLD and RESTART, and counts each mechanism.
- **`tb_dffc_full`** runs the same test on the default 512-chip array.
  The routes to the east face then cross six more routing CDPs, and the
  expected latencies grow by 4 cycles per CDP. Configuration alone shifts
  about 150,000 bits through the whole chain. With Verilator the build
  takes about 10 minutes on two cores and the run about 7 minutes.

## Capacity

The default array has 1024 CDPs. Typical operators need from about 13 CDPs
(an edge detector) to about 110 (a morphological erosion), not counting
CDPs used only for routing. In a 3-D mesh, routing typically leaves 30–50%
of CDPs doing useful work, so several such graphs fit side by side and run
independently. Line-length delays need the data RAM: a 768-pixel line needs
three 256-word RAMs in cascade.
