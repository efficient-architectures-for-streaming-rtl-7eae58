# A tiled reconfigurable DSP system-on-chip in SystemVerilog

Streaming signal-processing jobs such as FIR filters, FFTs and channel decoders
do simple arithmetic on a lot of data. Most of their energy goes into moving that
data, not into computing with it. This RTL models one processing tile of a tiled,
heterogeneous system-on-chip built for such jobs. It follows the published
Montium tile of the Chameleon architecture. The tile keeps its operands close to
the arithmetic: ten small local memories feed five 16-bit ALUs through private
register files. A statically scheduled sequencer drives it, so control costs
little. A network interface connects the tile to a network-on-chip (NoC). Through
that interface the rest of the chip configures the tile, fills and empties its
memories, starts it, and streams data through it.

The top module, `chameleon_soc`, puts four such tiles on a 6 x 6 mesh NoC. The
NoC carries two traffic classes: guaranteed-throughput (GT) and best-effort (BE).
Each tile runs on its own clock. The remaining 32 router ports are left open for
a central coordinating processor (at node 0) and for tiles of other kinds.

```
  chameleon_soc
    noc_mesh: 6 x 6 noc_router, XY routing, GT and BE virtual channels
      node 0            ext port (central coordinating processor)
      nodes 1..4        tile_noc_adapter --> montium_tile (own tile_clk each)
      nodes 5..35       ext ports (other tiles)
```

One Montium tile (`montium_tile`) is organised as follows:

```
            NoC port (16-bit words, valid/ready, noc_clk)
                 |                         ^
            cdc_fifo (rx)             cdc_fifo (tx)          clock-domain crossing
                 |                         |
              hydra_ni  --- config / DMA / start / wait / reset / stream ---+
                                                                             |
  montium_tp  (tile_clk)                                                     |
    sequencer --> instr_decoder --> control word for this cycle  <-----------+
    M01..M10 (local_memory, 1024 x 16) each with an agu
    tp_interconnect (crossbar)
    ALU1..ALU5 (montium_alu), each with 4 x alu_regfile (A, B, C, D)
    ALU(k+1).West --> ALU(k).East
```

## The tile processor

| part | count and size | module |
|---|---|---|
| ALU, 16-bit, combinational, two outputs | 5 | `montium_alu` |
| input register file, 4 x 16 bits, one per ALU input | 20 | `alu_regfile` |
| local memory, 1024 x 16 bits (2 KB) | 10 | `local_memory` |
| address generation unit, one per memory | 10 | `agu` |
| interconnect from memories/ALUs/stream to registers/memories/stream | 1 | `tp_interconnect` |
| decoder of configurable instructions, 32 entries | 1 | `instr_decoder` |
| sequencer, 256-instruction program, 2 loop counters | 1 | `sequencer` |

The counts, widths and depths of the ALUs, register files and memories come from
the architecture being modelled. So do these properties:

- the ALUs have no pipeline registers;
- an operand is always read from an input register, never bypassed;
- each ALU can pass a value to its left-hand neighbour.

The decoder depth, the program depth, the loop counters and all encodings are
this implementation's own choices.

### One instruction, one cycle

This timing rule matters most when you write programs for the tile. In every
cycle where the sequencer executes an instruction, the following happens.

1. Each memory is read at the address its AGU holds now. The read is
   asynchronous.
2. Each ALU computes from the register entries that the instruction selects
   (`rd_a` .. `rd_d`).
3. The crossbar delivers one value to every destination. The sources are the ten
   memory read ports, the ten ALU outputs, the head of the input stream, or zero.
4. At the rising clock edge, the selected register entries and memory words are
   written, and every AGU applies its command.

A value loaded from memory into a register in cycle *t* therefore reaches an ALU
in cycle *t+1*. To accumulate, route an ALU result back into one of its own input
registers: the C register in the FIR example below. A memory word written in
cycle *t* can be read in cycle *t+1*. A read of the word that is being written
returns the old value.

When the sequencer stalls or is held, the control word is forced to all zeros.
All zeros is a no-operation: nothing is written and no AGU moves.

### The ALU

Operands A..D and the East input are 16-bit signed. The `fixp` bit selects the
arithmetic for each instruction:

- **fixed point:** Q15. A product is `(x*y) >>> 15`, and every result saturates
  to [-32768, 32767].
- **integer:** a product keeps its low 16 bits, and sums wrap around.

| op | OUT1 | OUT2 |
|---|---|---|
| PASS | A | B |
| ADD / SUB | A+B / A-B | C+D / C-D |
| MUL | A*B | C*D |
| MAC | C + A*B (+ East if `use_east`) | C - A*B |
| AND / OR / XOR | A op B | C op D |
| MAX | max(A+B, C+D) | min(A+B, C+D) |
| ADDE | A + East | B + East |

The West output always carries A*B. ALU k+1's West drives ALU k's East, so a
row of ALUs can add up several products in one cycle without using the crossbar.
ALU5's East input is tied to zero. MAC's two outputs form a real butterfly. MAX
is the add-compare-select step of max-log trellis decoding. The operation set
itself is a choice of this implementation. The only requirements it meets are
signed integer and signed fixed-point support.

### Address generation

Each AGU holds a base, two strides and a length, all set by configuration. Its
address is `(base + offset) mod 1024`. The offset runs modulo the length, and
each instruction moves it with one of five commands: hold, step by `stride`,
step by `stride2`, reset to 0, or load. Load sets the offset to a data word
taken from the crossbar. A length of 0 means 1024, and strides must be
smaller than the length.

Two strides make circular buffers cheap. A FIR delay line of N words is read
backwards with `stride = N-1` and then advanced with `stride2 = 1`. Writing new
configuration resets the offset.

Load turns a memory into a lookup table. The word to look up, say a phase,
becomes the offset. In the same instruction the table entry appears on the
memory's read port. This is how functions an ALU cannot compute, such as a
sine, are evaluated in a single cycle.

### Control: sequencer and decoder

An instruction's control word (`ctl_t`, 377 bits) is far too wide to fetch every
cycle. Instead, up to 32 complete control words live in the decoder. Each
sequencer instruction (`seq_instr_t`, 19 bits) names one of them and adds a flow
operation:

| flow | effect |
|---|---|
| NEXT | pc + 1 |
| JUMP | pc = imm |
| SETCNT | counter[cnt_sel] = imm, pc + 1 |
| LOOP | if counter > 1: decrement, pc = imm; else counter = 0, pc + 1 |
| HALT | stop and raise `done` |

So a body marked LOOP with the counter set to N runs N times. The sequencer stalls
an instruction in two cases:

- it consumes a stream word (`in_rd`) and none is waiting;
- it produces one (`out_we`) and the output side is not ready.

A stalled cycle has no effect and is retried in the next cycle.

## Configuration memory

The sequencer program, the decoder table and the AGU settings together form the
configuration memory. It is written as RAM, one 16-bit word at a time, so a
reconfiguration rewrites only the words that change. Word addresses:

| address | contents |
|---|---|
| `0x0000 + 2*i + w` | sequencer instruction i (0..255), word w (low word first) |
| `0x1000 + 32*e + w` | decoder entry e (0..31), word w of 24 (low word first) |
| `0x2000 + 4*m + r` | AGU of memory m (0..9): r = 0 base, 1 stride, 2 stride2, 3 length |

In total this is 17,338 bits, about 2.1 KB. The modelled architecture's
configuration is about 2.6 KB. Reset clears the decoder (every entry becomes a
no-operation) and the AGUs. It does not clear the sequencer program.

## Network interface

`hydra_ni` runs on the tile clock and reads messages of 16-bit words from the
NoC. The header word holds the opcode in bits [15:12] and a memory number
(0 = M01) in bits [11:8].

| opcode | following words | effect |
|---|---|---|
| 1 CFG_WR | address, count, data... | write configuration words |
| 2 MEM_WR | address, count, data... | DMA into a local memory |
| 3 MEM_RD | address, count | DMA out: `count` words are sent back |
| 4 START | - | start the program at instruction 0 |
| 5 WAIT | - | send `0xD0E0` once the program has halted |
| 6 RESET | - | stop the program and clear pc and counters |
| 7 STREAM | count, data... | feed words to the running program |

The tile processor can work in two ways.

- **Block mode.** The interface is the master. It loads the inputs by DMA, starts
  the program, waits for it to finish and reads the results. The tile is held
  (`dma_hold`) from the address word of a MEM_WR or MEM_RD message to its last
  data word, so computation and transfers never overlap. Configuration writes do
  not hold the tile. A tile can therefore be partly reconfigured while other
  tiles keep running, but the program being changed should be stopped first.
- **Streaming mode.** The running program is the master. Words of a STREAM
  message go into an 8-word FIFO, and instructions consume them. Any word the
  program produces goes straight to the NoC. DMA read data and the WAIT reply
  take the transmit port only while their own message is being served.

Configuration and DMA move one word per tile clock. A 200-word load therefore
holds the tile for about 203 cycles, and the 1024 twiddle factors of an FFT take
about 1027 cycles.

The NoC side and the tile side may run on unrelated clocks. Two dual-clock FIFOs
(`cdc_fifo`, Gray-coded pointers, depth 8) join them. Each domain has its own
synchronous active-high reset. Assert both resets together.

## Example programs

`tb/montium_progs_pkg.sv` builds three programs as lists of configuration words.
They show how the tile is programmed.

**FIR filter, streaming, N taps (3 instructions, N + 2 cycles per sample).**
M01 holds the delay line and M02 the coefficients.

- Instruction 0 loads the loop counter with N. It also takes a sample from the
  stream into M01 and clears ALU1's A and C registers.
- Instruction 1 runs N times. Each pass loads x[n-j] into A and h[j] into B.
  ALU1 does a MAC on the previous pair, and its result goes back into C. The
  M01 pointer steps backwards and the M02 pointer forwards.
- Instruction 2 adds the last product and sends OUT1 to the stream. It moves the
  delay-line pointer one place forward, then jumps back to instruction 0.

The result is `y[n] = sum over j of sat(acc + ((h[j]*x[n-j]) >>> 15))`, with the
taps added in order j = 0..N-1.

**Product sum, block mode (L + 2 instructions).** ALU2 multiplies M03[i] by
M04[i] and sends the product West. In the same cycle ALU1 computes
M01[i]*M02[i] + East. The result goes to M05[i].

**Sine lookup, streaming (2 instructions, one lookup per sample).** M06 holds
1024 entries, `round(32767 * sin(2*pi*i/1024))`. Each stream word is loaded into
M06's AGU as the offset, and the entry read there is sent to the output stream.

## Network-on-chip

**Flits.** A flit has 16 data bits plus three more: the class (0 BE, 1 GT),
head and tail. A packet is one head flit and then its payload flits, the last
one marked tail. The head's data holds `{dest_x, dest_y, src_x, src_y}`, 4 bits
each. Node n is at x = n mod 6, y = n div 6.

**Routers** (`noc_router`) have five ports: local, north (y-1), east (x+1),
south (y+1) and west. Each input port has a 4-flit FIFO per class.
- A head flit is routed x first, then y.
- The chosen output is then locked to that input, for that class, until the
  tail passes (wormhole switching).
- Inputs competing for an unlocked output are served round-robin, one packet
  at a time. That is the fairness BE traffic is promised.
- Each link moves one flit per cycle. When both classes could use a link, GT
  goes first.

So GT flits never wait for BE flits. A GT packet's latency depends only on the
GT load, which whoever sets up GT streams controls. The flow control is one
ready bit per class per link. Ready depends only on FIFO occupancy, so
handshakes never form combinational loops across routers.

**Tile adapter** (`tile_noc_adapter`). It joins a tile's word port to its
router.
- Incoming: it consumes each head flit and remembers the sender and the class.
  It then passes the payload words to the tile's network interface. One
  packet is finished before a packet of the other class is accepted.
- Outgoing: every word the tile sends goes to the last sender, in the last
  sender's class. Words are packed into packets of up to 128 words (256
  bytes). A word becomes the tail when no further word is waiting behind it,
  so a reply leaves as soon as it exists.
- Network-interface messages are free to span several packets. A message may
  also share a packet with other messages.

Example: the coordinating node configures a tile by sending it a CFG_WR
message, in as many packets as it likes.


## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_montium_alu` | 12,000 random and corner-value results of all operations in both modes, against 32-bit integer arithmetic |
| `tb_alu_regfile`, `tb_local_memory` | storage against shadow copies; the register file has no bypass |
| `tb_agu` | 10,000 addresses under random configurations and commands, including load |
| `tb_tp_interconnect` | every destination under random selections |
| `tb_instr_decoder` | full and word-by-word (partial) rewriting |
| `tb_sequencer` | nested loops, jump and halt under random hold and stalls, against an instruction interpreter; 16 instructions executed |
| `tb_cdc_fifo` | 6,000 words across two clock ratios, full and empty reached |
| `tb_hydra_ni` | every message type; tile held throughout DMA; 200-word load in 203 cycles |
| `tb_montium_tp` | 16-tap FIR under input gaps and output back-pressure, exactly 18 cycles per sample when unhindered; product sum in L + 2 cycles |
| `tb_montium_tile` | the whole tile at default sizes through its NoC port, with 4 ns and 7 ns clocks: a 200-tap FIR over 24 samples with a coefficient reload between two runs, then the product sum over 64 elements with WAIT and a DMA read-back; then a 1024-entry sine table with 32 lookups; counts stalls, DMA holds, stream words, resets, the WAIT reply, table lookups and transmit back-pressure |
| `tb_noc_mesh` | 6 x 6 mesh: a GT stream of 256-byte packets corner to corner, alone and then under random 10-byte BE traffic from all other nodes. Checks that every packet arrives complete and in order, and that GT latency (138 cycles for 10 hops) is identical with and without BE load |
| `tb_chameleon_soc` | the whole system at default sizes. A model of the coordinating node sends interleaved packets to the four tiles, each tile on a different clock, while BE background traffic crosses the mesh. Tile 1 runs the 200-tap FIR over GT. Tile 2 runs the product sum over BE with WAIT and read-back. Tile 3 does sine lookups over GT. Tile 4 runs a product sum, then is reset and reconfigured to a 16-tap FIR while tile 1 is still computing. Counts packets per class in both directions, GT-over-BE link decisions, stalls, DMA holds, starts, resets and lookups; checks that all four tiles computed at the same time |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/montium_pkg.sv rtl/noc_pkg.sv tb/montium_progs_pkg.sv tb/tb_chameleon_soc.sv \
  --top-module tb_chameleon_soc -o sim && ./obj_dir/sim
```

The simulator has only two states, so every testbench resets or initialises what
it reads. `tb_montium_tile` runs in about 10 seconds and `tb_chameleon_soc` in about one
minute.

## How this differs from the architecture it models

These parts are modelled here only in the simplest way that does the job,
because they are specified only by what they do:

- **Interconnect.** It is a full crossbar, with one source select per
  destination. Its bus structure in the original is not specified, so no bus
  count is modelled.
- **Decoder.** The original keeps its instructions in several decoders. Here one
  table of complete control words does that job.
- **Encodings.** The ALU operations, the AGU scheme, the sequencer instruction
  set and the message format are all this implementation's own.
- **Memories.** The local memories and the configuration store are plain arrays
  with asynchronous read, not embedded SRAM macros. A physical implementation
  with synchronous-read SRAMs would need one more pipeline stage between the AGU
  and the crossbar.
- **NoC width.** The NoC port carries 16-bit words, the same width as the
  datapath.

- **NoC.** The original network's router design is not specified. The mesh,
  the XY routing, the packet format and the FIFO depths are this
  implementation's own. One behaviour differs from published simulations of
  the original. There, GT latency grows with BE load up to a guaranteed bound,
  because GT also uses bandwidth that BE leaves free. Here GT has strict
  priority on every link, so its latency does not change with BE load at all.
- **System size.** The mesh is 6 x 6. The number of Montium tiles (four, at
  nodes 1 to 4) is this implementation's choice.

These are not included:

- the central coordinating processor that maps applications and configures
  tiles (the system testbench contains a simple model of it);
- the other tile types (FPGA fabric, DSP or general-purpose cores).

Their router ports (`ext_*` on `chameleon_soc`) are where they would connect.

No FFT or turbo-decoder program has been written. The memories can hold a
1024-point complex FFT with its twiddle factors: 3072 of the 10,240 words. The
ALUs have the butterfly and max operations such a program would use.
