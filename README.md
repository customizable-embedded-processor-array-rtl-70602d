# A customizable array of small VLIW processors for block-based image processing

Many image operations (filters, colour conversion, transforms, motion search)
compute each output pixel from that pixel and a small neighbourhood around it.
This design maps such work onto an NH x NW grid of tiny single-cycle
processors. Each processor owns one pixel of an NH x NW *block*. The image is
cut into blocks. Each block travels into the array together with `r` rings of
neighbouring pixels (a "halo"). While the processors compute one block, the
next block streams in and the results of an earlier block stream out.

The processors are deliberately minimal. They have no data memory, only a
register file, a constant memory and a small instruction memory. Every size
is a parameter: array shape, halo depth, word width, register count, memory
depths and the set of ALU operations. An instance can therefore be trimmed
to one application.

Default configuration (`cpama_top` with no overrides): a 4 x 4 array, 32-bit
words, halo depth r = 1, one pixel per clock cycle in and out, 8 working
registers per processor, 64-word instruction memory, 16-word constant memory.

```
             image memory (outside)            host (outside)
                 |        ^                     |  programs, start, entry address
            rd_* |        | wr_*                v
        +--------v--------+--------+   +-----------------+
        |  cpama_mmu (block reader / |<--| cpama_gctrl     |
        |  result writer)            |   | (row counter,   |
        +------------+---------^-----+   |  LOAD / START)  |
             pixels  |         | results +---^--------+----+
        +------------v---------+-----+       |        |
        |  cpama_array                |  all_done  gctrl, fifo_shift
        |   s2p -> FIFO columns ------+-------------------
        |   NH x NW (router + processor)                  |
        |   FIFO columns -> p2s                           |
        +-------------------------------------------------+
```

## 1. How a block moves through the array

A block with its halo is a (NH+2r) x (NW+2r) window of the image; 6 x 6
pixels at the defaults. It enters through a **distributed FIFO**. The FIFO
is not a separate memory: its storage cells (FIFO registers, FR) sit inside
the processors.

* **Serial-to-parallel converter (`cpama_s2p`).** It collects one window row,
  BW pixels per cycle. Pixels enter at column 0 and shift right, so the pixel
  that arrives first ends up in the last column.
* **FIFO columns.** When a row is complete, every FIFO column moves down by
  one row (`fifo_shift`). The new row enters at the top of the array. The
  oldest row leaves at the bottom into the **parallel-to-serial converter**
  (`cpama_p2s`). That converter sends it out highest column first, so the
  output stream has the same order as the input stream.
* **Reverse order.** Because of the right-shift and the downward shift, the
  memory unit sends a window in reverse order: from the last pixel (bottom
  right) to the first (top left). After NH+2r rows every pixel sits in the
  FIFO register of the processor that needs it.

**Which processor holds which pixel.** Each processor holds its own centre
pixel. A processor on the array border also holds the halo pixels beyond that
border:

| position in the array | FIFO registers (rows x columns) |
|---|---|
| corner | (r+1) x (r+1) |
| top / bottom edge | (r+1) x 1 |
| left / right edge | 1 x (r+1) |
| interior | 1 x 1 |

`cpama_pkg::fr_span` and `fr_first` compute this layout. Inside a processor
the cells are numbered row-major: FR0 is the top-left cell it holds. For
r = 2 on a 4 x 4 array, the top-left processor holds window rows 0..2 and
columns 0..2 as FR0..FR8. Its right neighbour holds rows 0..2 of column 3 as
FR0..FR2. `tb_cpama_array` checks the whole 8 x 8 allocation table for that
case.

**Exchange instead of copy.** A processor has k FIFO-bound registers
(k = number of FR cells x A) plus NCOMP working registers. The global command
`GC_LOAD` *swaps* FR i with register i for every i < k, in all processors at
once. One command does two jobs:

* it hands the new block to the processors;
* it moves the previous block's results, which the program left in the
  FIFO-bound registers, into the FIFO so they stream out.

As a result, output runs **two blocks behind** input: one block is being
computed and one is sitting in the FIFO. The memory unit skips the first two
result blocks. At the end of an image it sends two all-zero flush blocks.

**Where a processor's result goes.** The centre pixel's own FIFO-bound
register is where the program must leave the result. For a border processor
that is the register of its centre cell, for example FR(r*(r+1)+r) in the
top-left corner and FR(r*(r+1)) in the top-right corner. Only centre pixels are written back to memory. Halo cells carry
whatever the program left in them, and the memory unit ignores them.

**Arguments (A).** Every FIFO cell can carry A words per pixel position, for
example two frames for motion search. The pixel stream then carries A words
per pixel. Register numbering is cell-major: cell c, argument a maps to
register c*A + a.

## 2. The processor (`cpama_processor`)

Each processor is a single-cycle machine that runs one instruction per
clock. It is a stripped-down MIPS-like datapath with:

* a program counter with address calculation (`cpama_pc`);
* instruction and constant memories (`cpama_mem`: asynchronous read,
  synchronous write for loading);
* the register file with the FIFO registers (`cpama_regfile`);
* a template ALU (`cpama_alu`) and an accumulator ACC.

There is no data memory.

One instruction can do all of these in the same cycle:

* read one register;
* run one ALU operation and optionally write the result to ACC (`enacc`);
* write one register (`regwe`) with either the ALU result or the word
  waiting on the router port (`regsrc` = 1 selects PortIn);
* send the register it read to a neighbour (`send`, `dir`);
* choose the next PC: next, jump, or wait.

**Operand sources (`alusrc`).**

| code | operand a | operand b |
|---|---|---|
| `AS_REG_CONST` | register | constant |
| `AS_REG_ACC` | register | ACC |
| `AS_PORT_CONST` | PortIn | constant |
| `AS_PORT_ACC` | PortIn | ACC |
| `AS_REG_PORT` | register | PortIn |

**Operations.** NOP, PASSA, PASSB, ADD, SUB, MUL, MAC (acc + a*b), AND, OR,
XOR, ABSD (|a-b|), SAD (acc + |a-b|), SHR (arithmetic) and MIN. The ALU
parameter `OP_EN` has one bit per opcode. An operation whose bit is clear is
not built, and its opcode returns 0. MUL and MAC share one multiplier.
ADD, SUB, MAC and SAD share one adder.

**Instruction word.** Field widths follow the configuration, so the word is
only as wide as needed. Fields from bit 0:

```
op(4) alusrc(3) enacc(1) regwe(1) regsrc(1) rd(RW) rs(RW) csel(CW)
send(1) dir(2) arg(ABITS) recv(1) pcsrc(2) jaddr(AW)
```

RW = clog2(k + NCOMP), with k taken from a corner processor (the largest) so
that every processor uses the same word layout. CW = clog2(CDEPTH) and
AW = clog2(IDEPTH). At the defaults k = 4, RW = 4, CW = 4 and AW = 6, so a
word is 35 bits.
`cpama_pkg::instr_t` is a fixed-width view of an instruction.
`instr_pack`/`instr_unpack` convert it to and from the stored word.

**Synchronisation with the controller.**

* `pcsrc = PC_WAIT` holds the PC and raises `done`.
* The controller waits until all processors are done.
* It then issues `GC_LOAD`, followed by `GC_START`. `GC_START` loads the PC
  with the externally supplied `ext_addr`. The same array can therefore hold
  several programs and switch between them per run, like a function call.
* Reset leaves every processor waiting at PC 0.

**Receiving.** An instruction with `recv` set consumes the word on PortIn. If
no word is there, the whole processor stalls, and no state changes until one
arrives.

## 3. The router (`cpama_router`)

Interior processors hold only their own pixel. They get neighbour values as
packets through a router. Each processor has one router, with links to the
North, South, East and West neighbours and to the processor itself. A packet
is a data word, a 2-bit direction, which is the destination, and an argument
number. Packets travel only between adjacent routers. There is no
multi-hop forwarding.

* **Outgoing.** A demultiplexer steers the processor's packet into the
  output register of the named link. It reaches the neighbour one cycle
  later.
* **Incoming.** Each link has a one-packet holding register. A fixed-priority
  multiplexer (North > South > East > West) presents the highest-priority
  full register on PortIn. The packet stays there until an instruction
  consumes it with `recv`. A packet that loses arbitration is delivered
  later, not lost. `conflict` shows when more than one is waiting.
* **Timing.** A packet sent in cycle t is visible to the receiving processor
  from cycle t+2.
* **Programmer's rule.** Never send a second packet to a link whose holding
  register is still full. An assertion checks this rule.

The argument number travels with the packet, but the processor does not use
it. It is kept for programs that want to tag packets.

## 4. Global handshake and throughput (`cpama_gctrl`, `cpama_mmu`)

The global controller has four states:

1. **FILL.** Input is open. Each completed row shifts the FIFO.
2. **WAIT.** All NH+2r rows are in. The controller waits for every processor
   to be done.
3. **LOAD.** Issues `GC_LOAD`.
4. **START.** Issues `GC_START`. Input re-opens in the next cycle.

The memory unit starts a block burst in the cycle it sees input open (a
Mealy-style issue). Its read latency is one cycle. Time per block is
therefore:

```
CT = (NW+2r)(NH+2r)/BW          communication time
PT = program length up to WAIT  processing time
BT = max(CT, PT) + 3            block time; 3 = LOAD + START + memory latency
```

At the defaults, CT = 36 and BT = 39 cycles, which the end-to-end test
measures. A 1520 x 1496 image has 142,120 blocks of 4 x 4, so it takes about
5.5 M cycles at BW = 1 and r = 1. Raising BW (several pixels per cycle)
divides CT. BW must divide NW+2r.

The memory unit (`cpama_mmu`) works as follows:

* It visits blocks left to right, then top to bottom.
* It reads each window in reverse order.
* It substitutes 0 for neighbour pixels outside the image.
* It writes centre pixels that lie inside the image to `out_base`.
  Argument a of pixel (x, y) is read from
  `in_base + a*plane_stride + y*img_w + x`.
* An image need not be a multiple of the block size. Blocks at the right and
  bottom edges are partial.

## 5. Programming the array

The host writes every processor's memories through `prog_we/prog_node/
prog_sel/prog_addr/prog_data`:

* processor (i, j) is node i*NW + j;
* `prog_sel` = 0 selects the instruction memory, 1 the constant memory.

The host then sets the image geometry and `ext_addr` and pulses `start`.
`done` rises after the last result is written.

`tb/cpama_prog_pkg.sv` is a small program generator and a worked example.

**`gen_dot3`: a 3 x 3 weighted sum, r = 1.** All 16 processors run the same
slot schedule in lock step. An unused slot is a NOP.

1. **Exchange columns.** Each processor sends the column pixels it holds to
   its east and west neighbours and receives theirs. After this it has the
   3 columns it needs for each row it holds.
2. **Partial sums.** For the row it holds, each processor computes the
   weighted row sums its north and south neighbours need and sends them.
3. **Final sum.** It adds its own row term and the partial sums it received.
   Edge processors use the halo rows they already hold instead.
4. **Finish.** It writes the sum into its centre FIFO-bound register and
   waits.

The program is 31 instructions and shorter than CT, so the array is
communication bound. The receive order follows the router priority. For
example, the east neighbour's pixel is received before the west one's.

**`gen_point`.** The point operation y = (x * c9) >>> c10 takes three
instructions.

## 6. Parameters

| parameter | default | meaning |
|---|---|---|
| NW, NH | 4, 4 | array columns, rows |
| R | 1 | halo depth r |
| W | 32 | word width |
| A | 1 | words per pixel position (arguments / frames) |
| BW | 1 | pixels per cycle in and out; must divide NW+2R |
| NCOMP | 8 | working registers per processor, beyond the FIFO-bound ones |
| IDEPTH, CDEPTH | 64, 16 | instruction / constant memory words |
| ABITS | 1 | width of a packet's argument number |
| OP_EN | 16'h3FFF | ALU operations built |
| MAW | 24 | image memory address width |

## 7. Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Example
with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/cpama_pkg.sv tb/cpama_prog_pkg.sv tb/tb_cpama_top.sv \
    --top-module tb_cpama_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace the testbench name to run another one. `tb_cpama_array`,
`tb_cpama_processor`, `tb_cpama_top`, `tb_cpama_tiff2bw` and
`tb_cpama_dot_sizes` need `tb/cpama_prog_pkg.sv`; the `-y tb` option finds
the harness `tb/cpama_dot_run.sv`. `tb_cpama_dot_sizes` builds five arrays of
up to 200 processors, and its Verilator build takes a few minutes.

What each testbench covers:

* **`tb_cpama_top`** runs the whole device at its default parameters. It
  loads two programs into all processors and filters a 14 x 10 image with the
  3 x 3 weighted sum, with partial blocks at the borders. It then switches
  program through `ext_addr` and applies a point operation. Both output
  images are compared with a reference computed in the testbench. It checks
  BT = 39 cycles between successive LOAD commands. It counts each mechanism:
  exchanges, external starts, router conflicts, zero-padded pixels, output
  overlapping input, and the program switch. A mechanism that never happens
  counts as a failure.
* **`tb_cpama_dot_sizes`** runs the weighted sum on several arrays side by
  side (width x height):
  * r = 1, 3 x 3 kernel: 2 x 8, 8 x 8, 4 x 16, 10 x 20 and 4 x 50;
  * r = 2, 5 x 5 kernel: 4 x 4 and 2 x 8.

  It checks every output pixel and the block time of each array. The r = 2
  program comes from `gen_dotr` in `tb/cpama_prog_pkg.sv`, which works for
  any r. It relays pixels east/west and partial sums north/south over r hops.
  It needs 16 working registers, 128 instruction words and 32 constants. On
  16 processors it is longer than CT, so a block takes PT + 3 = 118 cycles.
* **`tb_cpama_tiff2bw`** converts an RGB image to grey,
  (28 R + 59 G + 11 B) / 100. It uses a 4 x 4 array with r = 0, the three
  colour planes as three arguments (A = 3) and two pixels per cycle
  (BW = 2). The division is a multiplication by 5243 followed by a shift
  by 19. A block takes 8 + 3 = 11 cycles, so a 1520 x 1496 image would take
  about 1.56 M cycles. At the defaults (r = 1, BW = 1) the same image takes
  about 5.5 M cycles.
* **`tb_cpama_array`** checks the register allocation table for r = 2 and
  runs the dot product over several blocks.
* **The other testbenches** check their unit against independent models:
  random ALU operands, router arbitration and timing, converter ordering,
  controller sequencing and cycle counts, the memory unit's address walk and
  padding.

## 8. Where this design goes beyond, or differs from, its source description

The source describes the array, the FIFO layout, the processor datapath,
the router's mux/demux structure and the per-block timing formula. The
following choices are this design's own:

* **Instruction encoding and operations.** The field order, opcodes, operand
  multiplexing and the operation list. The source leaves the instruction
  width to the application and names only basic operations.
* **Synchronisation.** The WAIT/done protocol, the receive stall, and the
  LOAD/START controller as a state machine. The source leaves these to a
  global processor.
* **Results return by exchange.** LOAD is a swap, and results run two blocks
  behind, with two flush blocks at the end.
* **Router details.** The router priority order, the one-packet holding
  registers (the source only says a lower-priority packet is not passed), and
  the one-cycle link register.
* **Memory unit.** Zero padding for pixels outside the image and the block
  walk order.
* **Program loading.** Through a dedicated port rather than through the FIFO.
* **Start address.** The entry address for `GC_START` comes on its own
  broadcast bus (`ext_addr`). In the source it is delivered through the
  FIFO.
* **Uniform processors.** All processors share one operation set and one
  working-register count. The source trims each processor type separately,
  which the parameters allow only array-wide.

Not built:

* **Data cache.** The data cache in front of the image memory; the memory
  unit reads the memory directly.
* **Optional second register read port.**
* **IDCT and block-matching programs.** The ALU has the operations they need
  (MAC, SAD, MIN), and A/BW allow two frames and wide rows. Those programs are
  not written or tested.
* **Larger configurations.** Complete systems are simulated at these sizes:
  * the default 4 x 4 size;
  * up to 200 processors (10 x 20, 4 x 50) with r = 1;
  * 16 processors with r = 2;
  * 4 x 4 with r = 0, A = 3 and BW = 2.

  Other combinations, for example several arguments together with r > 0, are
  covered only by the unit testbenches.
