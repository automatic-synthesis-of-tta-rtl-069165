# A network of transport-triggered processors for a dataflow video decoder

A dataflow program describes an algorithm as *actors*: small state machines
that talk to each other only through FIFO queues of tokens. One way to turn
such a program into hardware is to give every actor its own small processor
and to make every FIFO of the program a hardware FIFO. That is the design
here. Each actor runs on a transport-triggered architecture (TTA) processor.
Each processor has one FIFO function unit per actor port, and its memories and
bus count are sized for its actor.

The network is the one for an MPEG-4 Simple Profile video decoder: 21
processors joined by 36 FIFOs. The RTL covers the processors, their function
units, their memories, the FIFOs and the network. The decoder's actor programs
are compiled software. They are not part of this hardware and are not
included. The tests run small test actors instead (see *Verification*).

## The network

| # | processor | in | out | buses | instr. words | data words |
|---|-----------|----|-----|-------|--------------|------------|
| 0 | source | 0 | 1 | 2 | 13 | 87 |
| 1 | serialize | 1 | 1 | 2 | 29 | 87 |
| 2 | parser | 1 | 5 | 2 | 3707 | 980 |
| 3 | broadcast (after parser) | 1 | 7 | 2 | 53 | 87 |
| 4 | mvseq | 1 | 1 | 2 | 334 | 91 |
| 5 | mvrec | 3 | 1 | 2 | 500 | 88 |
| 6 | address | 2 | 2 | 2 | 188 | 94 |
| 7 | buffer | 2 | 1 | 2 | 107 | 22265 |
| 8 | interpolation | 2 | 1 | 6 | 844 | 118 |
| 9 | add | 3 | 1 | 6 | 249 | 992 |
| 10 | broadcast (after add) | 1 | 2 | 2 | 53 | 89 |
| 11 | merger | 1 | 1 | 2 | 49 | 88 |
| 12 | display | 2 | pins | 2 | 1217 | 176 |
| 13 | dcraddr | 1 | 1 | 2 | 569 | 97 |
| 14 | dcrec | 4 | 4 | 2 | 930 | 1117 |
| 15 | blkexp | 2 | 1 | 2 | 597 | 209 |
| 16 | dcsplit | 1 | 2 | 2 | 859 | 157 |
| 17 | is | 2 | 1 | 2 | 154 | 92 |
| 18 | iap | 2 | 1 | 2 | 578 | 203 |
| 19 | iquant | 2 | 1 | 2 | 232 | 94 |
| 20 | idct2d | 2 | 1 | 6 | 1085 | 153 |

Memory widths: an instruction word is `buses x 30` bits and a data word is
32 bits. The FIFO list itself (`EDGE_SRC` / `EDGE_DST`) is in
`rtl/tta_pkg.sv`, with the processor numbers above. Each processor's FIFO
units are numbered in the order of that list, inputs first.

The sizes follow the resource figures published for this decoder: instruction
words, bus count and data-memory depth for each processor. Two of them are
placed with certainty:

- the parser has by far the largest program (3707 words);
- the buffer has the large data memory (22265 words), which holds the
  prediction frame.

The assignment of the remaining sizes to processors is this design's own. It
changes memory sizes only.

On the connections:

- Each connected pair of processors has exactly one FIFO here.
- There is one feedback loop: add, broadcast, buffer, interpolation, add.
  Any program set for this network has to put an initial token into that loop.

Two processors sit at the edges of the network:

- **source** reads the input stream out of its own data memory, which is
  loaded through the load port. It stands for the dedicated on-chip input
  memory.
- **display** has one extra FIFO write unit that is not connected to a FIFO.
  Its "full" input is `!display_ready`, and its push is `display_valid` with
  `display_data`. This is the output to the board's pins.

All memories together (at the sizes above, 256-deep FIFOs) come to
2,172,740 bits, about 265 KiB. The target FPGA class for this design (Cyclone
IV EP4CE115) has 432 kB of block RAM. The original implementation also used
TTA instruction compression to save memory blocks. That is not built here, so
these instruction memories are uncompressed.

## How one processor works

A TTA processor has a single instruction, the **move**. The function units
expose *ports*, and the program moves values between them over the transport
buses:

- **Operand port:** a register that only stores a value.
- **Trigger port:** writing it starts the unit's operation. The opcode is part
  of the port address.
- **Result register:** the unit's output, read as a move source.

Nothing in the hardware tracks dependencies. The program (in practice a
compiler) has to read each result exactly when it is ready, and it must never
let two moves write the same port in one cycle. Assertions in `tta_core`
check the second rule.

### Instruction word

One instruction has one 30-bit slot per bus. Slot `b` sits at
`instr[30*b +: 30]`:

| bits | field | meaning |
|------|-------|---------|
| 29:27 | guard | 0 always, 1 if b0, 2 if !b0, 3 if b1, 4 if !b1 (BOOL registers) |
| 26 | imm | 1: source is the 16-bit signed immediate in `src` |
| 25:10 | src | `{6'b0, unit, sub}`, or the immediate |
| 9:0 | dst | `{unit[5:0], sub[3:0]}`; unit 0 = no move |

The units are:

| unit | name | dst sub | src sub |
|------|------|---------|---------|
| 1 | ALU | 0 operand; 1..13 trigger: add sub and ior xor eq gt gtu shl shr shru sxqw sxhw | result |
| 2 | LSU | 0 store data; 1..8 trigger (byte address): ldw ldh ldhu ldq ldqu stw sth stq | loaded value |
| 3 | LOGIC | 0 operand; 1..3 trigger: and ior xor | result |
| 4 | BOOL (2 x 1 bit) | register | register |
| 5, 6 | RF_1, RF_2 (12 x 32) | register | register |
| 7 | GCU | 0 RA; 1 jump; 2 call (value = instruction index) | RA |
| 8 + k | FIFO read unit k | 1 status, 2 read, 3 peek | result |
| 8 + NIN + k | FIFO write unit k | 1 status, 2 write (value = token) | status result |

`tta_pkg` has helper functions that build slots: `mv(src_port, dst_port, guard)`,
`mvi(value, dst_port, guard)`, `nop()` and `port(unit, sub)`.

### Timing the program has to respect

| operation | result readable by the instruction ... |
|-----------|----------------------------------------|
| ALU, LOGIC | 1 cycle after the trigger |
| LSU load | 2 cycles after |
| FIFO status (read or write side) | 1 cycle after |
| FIFO peek | 2 cycles after |
| FIFO read | 3 cycles after |
| register / BOOL write | the next instruction (guards too) |
| jump / call | one delay slot: the next instruction still executes |

Other timing rules:

- If an operand and its trigger are written by the same instruction, the new
  operand is used.
- `call` puts the address after the delay slot into RA. A return is
  `mv(port(U_GCU,0), port(U_GCU,GCU_JUMP))`.
- Each register file has one read socket. An instruction may read only one
  register of each file, though several buses may carry that one register.

### Stalls: the only dynamic behaviour

All timing is static except at the FIFOs. A **read or peek on an empty FIFO**,
or a **write to a full FIFO**, stops the whole processor (a global lock).
While locked:

- the PC holds;
- the fetched instruction holds;
- every function unit's pipeline holds, including results still in flight.

The instruction then completes in the first cycle the FIFO allows it.
Latencies measured in instructions therefore stay the same across a stall.
`stalled` (`proc_stalled[p]` at the top) shows the lock. A program that wants
to avoid blocking can test `status` first, as dataflow actors normally do
before firing.

### Fetch

The instruction memory is synchronous. The GCU presents the fetch address,
and the word arrives and executes one cycle later. With `run` low, the
processor sits at address 0 and executes nothing. Memories are loaded while
`run` is low.

## Using it

The top is `tta_network`. To run it:

1. Hold `run` low.
2. For each processor `p`, write its program:
   `load_we=1, load_proc=p, load_sel=0, load_addr=i, load_data=word i`.
   For a processor with fewer than six buses, only the low `buses*30` bits of
   `load_data` are used.
3. Write data-memory words the same way with `load_sel=1`. The source's input
   data goes here.
4. Raise `run`.
5. Take tokens from the display port with `display_valid`/`display_ready`.

Parameters:

- `tta_network`: `FIFO_DEPTH` (default 256).
- Per processor: `NUM_BUSES`, `NIN`, `NOUT`, `IMEM_WORDS`, `DMEM_WORDS` in
  `tta_proc`. The network sets them from the tables in `tta_pkg`.

To change the network, edit `EDGE_SRC`/`EDGE_DST` (and `NUM_EDGES`) and the
three per-processor tables in `tta_pkg`. The FIFO units and wiring follow
from those tables.

Simulate one testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/tta_pkg.sv tb/tb_tta_network.sv --top-module tb_tta_network
./obj_dir/Vtb_tta_network
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

## Verification

Each module has a self-checking testbench that compares against values
computed independently in the testbench:

- `tb_hw_fifo`: random traffic against a queue, through full and empty.
- `tb_fifo_read_fu`, `tb_fifo_write_fu`: every operation at its exact
  latency, stall requests on empty/full, nothing popped or pushed under the
  lock.
- `tb_alu_fu`, `tb_logic_fu`, `tb_lsu_fu`, `tb_reg_file`, `tb_gcu`: all
  operations against reference models. These cover load sign/zero extension,
  sub-word stores, the delay slot and the call return address.
- `tb_tta_core`, `tb_tta_proc`: a processor runs a two-input, one-output test
  actor with read, peek, status, ALU, LOGIC, store/load, guarded moves and a
  call/return. The FIFOs have depth 4, and the testbench feeds and drains
  them so that the processor stalls both on empty inputs and on a full
  output.
- `tb_tta_proc_6bus`: a six-bus processor that reads both inputs in one
  instruction, makes six moves in one instruction and writes both outputs
  together. One firing must take exactly 5 cycles.
- `tb_tta_network`: the whole network at default sizes.
  - Every processor gets a test actor: read one token from each input, add
    them and the processor number, write the sum to each output.
  - The source streams 700 words from a table in its data memory.
  - The buffer emits an initial token to open the feedback loop.
  - A model in the testbench predicts every display token, and all 700 are
    checked.
  - The display is held back for 20,000 cycles, so FIFOs fill up and
    processors stall on full outputs as well as on empty inputs. The test
    counts both kinds of stall, the back-pressure and a completely full FIFO.
  - The run takes about 35,000 cycles and a few seconds of simulation.

What is not verified: nothing here runs real decoder actors, so the
published frame rate and cycle counts cannot be reproduced.

## Choices made in this design

These points are not given by the original design and were chosen here:

- Instruction encoding, guard set and opcode numbering.
- Latencies of the ALU, LOGIC and LSU. The FIFO units' latencies only had to
  fall between 1 and 3 cycles; the split status 1 / peek 2 / read 3 is a
  choice.
- The single delay slot after a jump.
- Stalling on an empty or full FIFO. The alternative would be to leave it to
  software to test `status` first.
- The write unit's `status` returns the number of free places.
- Tokens are 32 bits wide and FIFOs are 256 deep.
- Memories are synchronous. The LSU is little-endian and byte-addressed.
- The load port stands in for memory images built into the FPGA bitstream.
- The ALU operations beyond add, and, eq, gt, gtu, ior and shl, and the loads
  `ldhu` and `ldqu`, complete the instruction set.
- The edge list of the network and the assignment of memory sizes to most
  processors (see *The network*).

## Files

- `rtl/tta_pkg.sv`: encoding, opcodes, latencies, network tables, slot
  builders.
- `rtl/tta_network.sv`: top.
- `rtl/tta_proc.sv`: processor plus memories.
- `rtl/tta_core.sv`: buses, sockets, guards, lock.
- `rtl/alu_fu.sv`, `rtl/logic_fu.sv`, `rtl/lsu_fu.sv`: function units.
- `rtl/reg_file.sv`, `rtl/gcu.sv`: register files and control unit.
- `rtl/fifo_read_fu.sv`, `rtl/fifo_write_fu.sv`, `rtl/fu_result_pipe.sv`:
  FIFO function units and the shared result delay line.
- `rtl/hw_fifo.sv`: the FIFO between processors.
- `tb/tb_*.sv`: one testbench per module, named after it.
