# PPAN: a two-layer SIMD/MIMD Array/Net

This is synthesizable SystemVerilog for the Parallel Pyramidal Array/Net. It is a machine for
image analysis, large-matrix arithmetic and AI/database work, and it runs as two computers at
once that share the same memory:

* **First layer: a 16x16 SIMD array.** It has 256 8-bit *Slave* processors. Each Slave has its
  own 16K bytes of memory and is linked to its four nearest neighbours.
* **Second layer: a 4x4 MIMD network.** It has 16 *Master* processors. Each Master runs a Group
  of 4x4 Slaves and can also act as an 8-, 16-, 24- or 32-bit computer of its own, with the
  Group's 256K bytes as its memory.

The key idea: the Master of a Group is the sequencer that broadcasts microwords to its 16 Slaves.
It can also gang one to four of those Slaves into a single wider processor. So the upper layer
reads the lower layer's results in place, with no copying. The array and the network never run
at the same moment in one Group. Each Group, however, can be in either mode on its own. All
Groups may run one program in lockstep as one 256-processor array. Sets of Groups may run
different programs, some as SIMD sub-arrays and some as independent Masters. All 16 Masters and
a host computer share one common bus.

The numbers below come from the source architecture. The 16 Groups of 16 Slaves, the 8-bit
Slaves built from two 4-bit slices, the 16K bytes per Slave and the 64-bit microwords fetched as
16 bytes are all its own. So are the neighbour links, the three border options, image input from
the left, the 8/16/24/32-bit Master and the common bus. Its timing is also taken over: 400 ns
memory, 600 ns per byte for left-right transfers and 400 ns per bit up-down. The architecture
does not define an instruction set, register set, bus protocol or port list. Those are this
design's own, and they are marked as such below.

## Machine at a glance

| | value |
|---|---|
| Groups | 16, on a 4x4 grid (`NGRP`, `GSIDE`) |
| Slaves per Group | 16, on a 4x4 grid (`NSLV`, `SIDE`) |
| Whole array | 16x16 Slaves (`ASIDE`) |
| Slave | 8 bits: two 4-bit ALU slices, accumulator `A`, shift register `Q` |
| Slave memory | 16384 x 8 (`MEM_DEPTH`); 4 MiB over the whole machine |
| Master word | 8, 16, 24 or 32 bits: 1 to 4 Slaves with their carries chained |
| Microword | 64 bits; one memory fetch gives a pair (one byte from each Slave) |
| Clock | one period stands for 200 ns |

All sizes and the timing constants are in `rtl/ppan_pkg.sv`.

## Where things are on the array

Group `g` is at grid row `g/4`, column `g%4`. Slave `k` of that Group is at array row
`4*(g/4) + k/4` and array column `4*(g%4) + k%4`. So Slave 0 is the north-west corner of its
Group and Slave 15 the south-east corner. "West" means lower column numbers. Image columns
enter from the west edge.

## The Master and its microwords (`master_seq`)

A Master keeps its program in the same memories as the data. Fetching microword pair `p` reads
address `p` in all 16 Slave memories at once:

* Bytes from Slaves 0..7 form microword `2p`, least significant byte in Slave 0.
* Bytes from Slaves 8..15 form microword `2p+1`.

The pair is buffered, so the second word of a pair costs no memory cycle. A jump into the same
pair costs none either. The program counter counts microwords (15 bits). Every Group must hold
its own copy of any program it runs.

Microword fields (`uword_t`):

| bits | field | meaning |
|---|---|---|
| 63:58 | `op` | operation, see below |
| 57:54 | `fn` | ALU function: PASS (b), ADD, SUB (a−b), AND, OR, XOR |
| 53:51 | `src` | operand source: OWN memory, W, E, N, S neighbour, IMM |
| 50 | `gang` | 0: all 16 Slaves, SIMD. 1: a Master word |
| 49:48 | `wid` | Master word length − 1 (bytes) |
| 47:44 | `base` | Slave holding the word's low byte, in registers |
| 43:40 | `mslv` | Slave whose memory holds the word's low byte |
| 39:26 | `addr` | data address; for branches, the target microword index |
| 25:22, 21:18 | `tgrp`, `tslv` | SEND: target Group and Slave |
| 17:2 | `imm` | immediate, 16 bits |

Operations:

| op | effect | clocks |
|---|---|---|
| `OP_ALU` | `A <= fn(A, operand)` in every enabled Slave; flags Z/C/N are kept | OWN 2, W/E 3, N/S 19, IMM 1 |
| `OP_ST` | own memory `[addr] <= A` | 2 |
| `OP_SHIFT` | `A <=` the `A` of the neighbour in direction `src` | W/E 3, N/S 16 |
| `OP_JMP`, `OP_BZ`, `OP_BNZ`, `OP_BC`, `OP_BN` | branch, always or on a flag | 1 |
| `OP_SEND` | bus write of `A[base]` into Group `tgrp`, Slave `tslv`, `addr` | 1 + wait for the bus |
| `OP_HALT` | stop; `halted` rises | 1 |
| fetch of a new pair | | 2 |

### SIMD words and Master words

With `gang = 0`, all 16 Slaves do the same thing to their own data. This is the array layer.

With `gang = 1`, only Slaves `base .. base+wid` change. Their ALU slices form one carry chain,
so they act as a single 16-, 24- or 32-bit processor. A byte router moves the operands: Slave
`k` takes the byte fetched by Slave `k + (mslv − base)`, and a store goes back the same way.
Because of this, a Master word can come from any four memories in the Group and be stored into
any four, as the architecture requires. A word must not run past Slave 15. The immediate fills
only the two low bytes.

### Timing

A memory cycle is 2 clocks (400 ns DRAM).

A left-right neighbour fetch or register shift takes 3 clocks: the 600 ns per byte of the
architecture.

Up-down links are only one bit wide. They use the bit-slice shift pins, as the architecture says
the board forces. A vertical fetch therefore runs in three steps:

1. Load `Q` from memory.
2. Shift eight bits through `Q` from the neighbour. Each bit takes 2 clocks (400 ns).
3. Run the ALU. This step is one more clock, which is this design's choice.

The microprogram never sees this difference: N and S look like W and E, only slower.

A bus access to a Group's memory takes that Group's memory port for one clock and freezes its
Master for that clock.

## Neighbour links and the Group boundary (`ppan_group`, `slave_pe`, `slave_mem`)

Inside a Group, a Slave reads its west or east neighbour's memory byte at the Group's current
address. It also sees the neighbours' `A` for register shifts. Across the top and bottom it sees
the one-bit shift line of each neighbour.

Across a Group boundary a Slave reads the neighbouring Group's edge memory. Each memory has a
second, read-only port for this. The Group that reads drives that port's address. When all
Groups run in lockstep, this is just the array's neighbour fetch. When Masters run different
programs, a Master can still read the neighbouring Group's edge memory at an address of its
choice. The network layer uses this to pass data from Group to Group.

In the original architecture, that case was a contention for the neighbour's memory, left to the
programmer. Here the extra port removes it. Up-down lines and `A` registers have no such port: a
Group shifting vertically while its neighbour is not gets whatever the neighbour holds.

## Array border and image input (`ppan_border`)

Beyond the outer edges of the 16x16 array, the border gives one of three settings, chosen from
the bus:

* `BRD_INPUT`: each row's leftmost Slave reads that row's `img_in` byte. The other edges read
  the border value.
* `BRD_WRAP`: leftmost and rightmost columns are neighbours, and so are the top and bottom rows.
* `BRD_CONST`: every edge reads the border value, for example 0 for empty background.

For up-down transfers at a constant edge, the 8-bit value is replayed MSB first, one bit per
step.

To load a picture, set `BRD_INPUT` and run sixteen `OP_SHIFT W` microwords. Each shift moves
every row one Slave to the east. The image source presents the next column each time
`img_shift` pulses, and must present column 15 first. A 16x16 byte image takes sixteen 3-clock
shifts (9.6 µs) plus 2-clock pair fetches: 62 clocks in all. Larger images are loaded one 16x16
tile at a time and stored, for example 64 tiles of 64 bytes per Slave for a 128x128 picture.

## Common bus and host interface (`ppan_bus`, `ppan_top`)

One command moves per clock. The host always wins the bus. The Masters' SENDs are served
round-robin, and a Master waits in its SEND until it is granted. Commands (`bus_cmd_t`):

| op | effect |
|---|---|
| `BUS_WR` | write a byte to (`grp`, `slv`, `addr`); with `bcast`, to every Group (program loading) |
| `BUS_RD` | host reads a byte; `host_rdata` is valid with `host_rvalid` one clock later |
| `BUS_START` | start Group `grp` at microword `addr`. With a non-zero `gmask`, start that set of Groups in the same clock. With `bcast`, start all Groups |
| `BUS_BORDER` | border mode = `addr[1:0]`, border value = `data` |

Groups started by one command stay in lockstep as long as nothing steals their memory cycles.
This is how a set of Groups becomes a SIMD sub-array, or how several Masters run one program.
Each Group in the set still needs its own copy of that program.

The host drives `host_req` and `host_cmd` for one clock per command. `halted[g]` shows which
Groups are stopped.

## Design choices that go beyond the architecture

* The instruction set, microword layout, ALU functions and the `A`/`Q` registers.
* The clock placement inside an operation, and the extra clock at the end of a vertical fetch.
* The bus protocol, host priority, round-robin order, broadcast write and set start.
* The second, read-only memory port for cross-Group reads, described above.
* A Master word must not wrap past Slave 15, and the immediate is 16 bits wide.
* Reset: every Group halted, `A = Q = 0`, border constant 0. Memories are not cleared.
* The pair buffer is not updated when a program writes into the pair it is executing.

## Simulating

`rtl/ppan_pkg.sv` must come first. With plain Verilator, for example:

```
verilator --binary --timing --assert -y rtl +libext+.sv \
  rtl/ppan_pkg.sv tb/tb_ppan_util.sv tb/tb_ppan_top.sv --top-module tb_ppan_top
./obj_dir/Vtb_ppan_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and finishes on its own:

| testbench | what it checks |
|---|---|
| `tb_alu_slice4` | every operand, carry and function |
| `tb_slave_mem` | both ports against a scoreboard |
| `tb_slave_pe` | 5000 random control words against a model; bit-serial byte transfer |
| `tb_master_seq` | clock-exact strobe timing of every operation type; pair buffer, branch, SEND wait, bus steal |
| `tb_ppan_bus` | every command, including a set start; host priority; round-robin order |
| `tb_ppan_border` | all three border settings; MSB-first constant stream |
| `tb_ppan_group` | one Group: SIMD neighbour fetches and shifts, 32-bit ganged add, counted loop, branches on carry and sign, SEND, read while running |
| `tb_ppan_top` | the full-size machine: see below |

`tb_ppan_top` runs with every parameter at its default and simulates in well under a second. It has
three parts:

1. It broadcasts a program into all 16 Groups, shifts a random 16x16 image in, and checks the
   shift timing. It then computes east and south neighbour sums across Group edges.
2. It repeats neighbour operations with the border set to wrap.
3. Three Groups run as independent Masters with 8/16/24/32-bit arithmetic, a loop, a
   cross-Group fetch and simultaneous SENDs. At the same time, two more Groups, started in the
   same clock, run as a SIMD sub-array.

It also counts that bus contention, memory-cycle stealing, image shifting and bit-serial
transfers all happened.
