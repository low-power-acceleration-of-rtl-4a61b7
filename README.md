# Near-memory CNN acceleration on a RISC-V SoC

Convolutional layers spend most of their time and energy moving pixels and
weights between memory and the processor. This SoC puts a small CNN
accelerator, with its own memories, next to the system SRAM. A DMA that the
core controls with a single custom instruction feeds it, so the core can keep
working while an image is convolved. The core runs the fully connected layer
itself, helped by a custom multiply-accumulate instruction.

The RTL follows the system described in the thesis *Low-power Acceleration of
Convolutional Neural Networks using Near Memory Computing on a RISC-V SoC*: the
final system with two main SRAMs, a DMA and an accelerator. The RISC-V core is
a vendor core and is not included. What was added to it is included: the
custom-instruction logic and the register file with its third read port. The
core's bus port and its pipeline-side signals are ports of the top level,
`nmc_soc`. The thesis gives the structure of
the system, the DMA and its programming model, but only the function of several
blocks. Where this RTL had to fill in details, the file headers say so, and the
section "Where this RTL departs or fills in" lists them.

## System

```
             core AHB port                       SWC (EX stage)
                  |                                   |
            +-----v-----+      +--------------+    +--v-------+
            | decoder 0 |      |  decoder 1   |<---|   DMA    |--irq--> core
            +-----+-----+      +------+-------+    |          |
                  |  \        /       |            | front    |
                  |   \      /        |            | mid      |
            +-----v--+ +----v---+ +---v----+       | back x2  |
            | arb    | | arb    | | arb    |       +----+-----+
            +---+----+ +---+----+ +---+----+            | accelerator master
                |          |          |                 v
          Memory 1    Memory 2    DMA registers    acc_bridge
          96 kB       32 kB       (core only)          |
                                                   cnn_accel
                                                   IFM | WGT | OFM
```

| Address (core)              | Slave                         |
|-----------------------------|-------------------------------|
| `0x0000_0000` - `0x0001_7FFF` | Memory 1, 96 kB (program/data of the core) |
| `0x0002_0000` - `0x0002_7FFF` | Memory 2, 32 kB (mainly for DMA traffic)   |
| `0x0003_0000` - `0x0003_0FFF` | DMA register port                          |
| anything else                | two-cycle AHB ERROR                        |

The DMA's memory master sees the same two memories at the same addresses. It
cannot reach the register port. Both memories can be reached by both masters,
so the core can work in one memory while the DMA streams from the other. When
both use the same memory, the core has priority.

All buses are AHB-Lite, 32 bits, single transfers (no bursts). The types are in
`ahb_pkg`: a master drives an `ahb_m2s_t` (HSEL, HADDR, HTRANS, HWRITE, HSIZE,
and HWDATA of the data phase) and a slave returns an `ahb_s2m_t` (HRDATA,
HREADYOUT, HRESP).

## The interconnect and its arbiters

`ahb_interconnect` is a small bus matrix. Each master has an `ahb_decoder`.
The decoder selects one slave from the address. It remembers which slave owns
the current data phase and returns that slave's response. An address that maps
to no slave gets the standard two-cycle ERROR.

Each slave has an `ahb_arbiter`. This is the hardest part of the bus to follow.
The arbiter has a fixed priority: port 0, the core, first. In every cycle in
which the slave can take an address phase, the arbiter sends the
highest-priority request straight to the slave in that same cycle, so the
winner loses no cycle. A request that loses is copied into a one-entry buffer
for its port. This also covers a request that arrives while the slave is
stalling. From its own point of view the losing master has already finished
its address phase and moved on to the data phase. So the arbiter holds that
master's HREADYOUT low. It forwards the buffered request when the slave is next
free, and the master's wait ends when that transfer's data phase completes at
the slave. For a write, HWDATA is taken from the stalled master, which keeps
HWDATA stable while it waits. A buffered request competes with new ones on
priority like any other request.

## Memories

`ahb_sram` puts one `sram_sp` behind an AHB port. The SRAM has the native
interface of compiled macros: a write takes one cycle, and read data arrives
one cycle after the address. Reads therefore drive the SRAM address during the
AHB address phase, and the data is there in the data phase with no wait state.
Write data only arrives in the data phase, so the write address is registered
and the write happens then. If a read's address phase falls in that same cycle,
the single port is busy. The read is then done one cycle later, and its data
phase gets one wait state. Byte and halfword writes use byte enables. Memory 1
is 24576 words, which is not a power of two. Addresses in its 128 kB window
wrap modulo the size. SRAM contents are not reset.

## The DMA

The DMA (`dma`) has three parts:

* **Front-end** (`dma_frontend`). A transfer request is a start address and a
  32-bit control word. The core can queue one with a single SWC instruction.
  It can also write the register port: `0x0` start address, then `0x4`
  control data. Writing `0x4` with START = 1 queues the pair. `0x8` is status:
  bits [3:0] hold the number of queued requests and bit 4 means full.
  Requests wait in a paired address FIFO and control FIFO, four deep. While the
  queue is full, an SWC stalls the core (`swc_stall`), and a register write is
  held with wait states.
* **Mid-end** (`dma_midend`). The controller takes one request at a time and
  runs it:

  | MODE [31:29] | Action |
  |---|---|
  | `000` | NRTX words from memory (start address, stride 2^BITSH words) to accelerator ACC, words ACC_ADDR, ACC_ADDR+1, ... |
  | `010` | NRTX words from accelerator ACC (from ACC_ADDR) to memory (start address, stride 2^BITSH words); then `irq` pulses for one cycle |
  | `001` | write 1 to accelerator ACC's control word, which starts an inference |
  | other | dropped |

  The other fields are ACC [28:27], ACC_ADDR [26:15], BITSH [14:12],
  NRTX [11:1] and START [0], which must be 1. They are declared as
  `nmc_pkg::dma_ctrl_t`.
* **Back-ends** (`dma_backend`, two of them). Each is an AHB master. One
  reaches the memories through the interconnect. The other is wired directly
  to the accelerator bridge. On the accelerator bus the byte address is
  `{ACC, word[11:0], 2'b00}`, which gives each of up to four accelerators a
  private 16 kB space. This SoC has one accelerator, and its bridge does not
  decode ACC, so all four values reach it.

**Timing.** A back-end does one transfer at a time. It accepts a request in an
idle cycle and drives the address phase in that same cycle. A write finishes
in the next cycle, so writes can go every second cycle. A read registers
HRDATA and reports it one cycle later, so reads go every third cycle. The
controller could issue a request in every cycle. A two-word buffer lets the
next read overlap the current write, so a block transfer moves one word every
three cycles. Measured: 100 words from memory to the accelerator take 304
cycles, and 64 words back take 196 cycles.

**Interrupt.** `dma_irq` pulses for one cycle when a transfer from an
accelerator back to memory has finished. It is meant for bit 0 of the core's
external interrupt vector.

## The SWC and MAC instructions

The core has three pipeline stages: fetch, decode (ID) and execute (EX). EX
reads and writes the registers. The top level takes the instruction in EX
(`ex_instr`, `ex_valid`). The instruction's rs1, rs2 and rd fields address the
three read ports of `gpr_3r`. This is the core's 32 x 32-bit register file with
a third, combinational read port added. SWC and MAC take their operands from
there, and `gpr_rs1_val`/`gpr_rs2_val` carry the first two to the core's other
units. All other register writes come in through the core's write-back port
(`gpr_we`, `gpr_waddr`, `gpr_wdata`).

`swc_unit` decodes SWC in EX. SWC is S-type. It writes
no register, so its immediate bits carry extra data:

| bits | 31:25 | 24:20 | 19:15 | 14:12 | 11:9 | 8:7 | 6:0 |
|---|---|---|---|---|---|---|---|
| field | DMA address | rs2 = memory address | rs1 = control data | `000` | Opt1 | Opt2 | `0001011` (custom-0) |

When the addressed DMA has room, `dma_we` is high for one cycle and all fields
go onto the DMA's input buses. Only DMA address 0 exists, so the front-end
ignores other addresses. Opt1 and Opt2 are brought out but are not used yet.

`mac_unit` computes `rd <- rd + rs1 * rs2` in one cycle. MAC is R-type with
opcode custom-1 (`0101011`), funct3 `000` and funct7 `0`. The old value of rd
comes from the third read port. In the cycle a MAC is in EX with `ex_valid`
high, the top writes the result to rd at the clock edge. So `ex_valid` must be
high for exactly one cycle per MAC. The core's own write-back must be idle in
that cycle; an assertion checks this. Because the write lands at the edge and
the reads are combinational, a second MAC in the next cycle already sees the
new rd. No bypass is needed.

`custom_hazard` is the decode-stage check for both instructions. Suppose EX
holds an unfinished multi-cycle instruction, such as a load or a division, and
it writes a register that the custom instruction in ID reads. For MAC this
includes rd. Then ID and FE stall until EX completes. Register x0 never causes
a stall.

## The accelerator

`cnn_accel` holds three 2 kB memories of 16-bit words:

* IFM, the input feature map: single port.
* WGT, weights, biases and configuration: single port.
* OFM, the output feature map: dual port (`sram_dp`). The engine writes it
  while the bus side reads.

Between the memories sits `cnn_engine`. The accelerator has a native RAM port
with a memory-select input: 0 IFM, 1 WGT, 2 OFM, 3 control. Writing 1 to
control word 0 starts an inference. Reading it returns `{done, busy}`.

`acc_bridge` puts this port on the DMA's accelerator bus. HADDR[13:12] selects
the memory and HADDR[11:2] the word. Data travels in bits [15:0]. The bridge
lines up the write address, which arrives a cycle before the AHB write data.
Reads are presented in the address phase. A read that collides with a write
waits one cycle. **While an inference runs, every memory access is held with
wait states.** So a DMA request that copies the OFM back can be queued right
behind the start command, and it simply completes when the result is ready.
Control-word accesses never wait.

**Engine.** At start, the engine reads four configuration words from WGT:

| WGT word | Contents |
|---|---|
| 0 | image size N (8, 16 or 32) |
| 1 | input channels C |
| 2 | filters F |
| 3 | shift SH |
| from 4 | filter f: 9C weights in (c, ky, kx) order, then its bias |

Filter f starts at word `4 + f*(9C+1)`. The IFM holds `c*N*N + y*N + x`. For
each filter, the engine computes a 3x3 convolution over all channels with one
pixel of zero padding, so the output stays N x N. Each output is
`sat16((sum x*w + (bias << SH)) >>> SH)`. It then applies ReLU and a 2x2,
stride-2 max-pool. The result goes to OFM word `f*(N/2)^2 + py*(N/2) + px`.

There is one 16x16 multiplier and a 48-bit accumulator. The engine works
through one pooling window at a time: four convolution outputs, then one OFM
write. Memory reads are issued a cycle ahead of the multiply-accumulate that
uses them. An inference takes `6 + F*(N/2)^2*(4*(9C+2)+1)` cycles: 5766 for
the 8x8, one-channel, eight-filter layer of the evaluated network.

Capacity follows from the 1024-word memories:

* IFM: `C*N*N <= 1024`.
* OFM: `F*(N/2)^2 <= 1024`.
* WGT: `4 + F*(9C+1) <= 1024`.

An 8x8 MNIST image with eight filters uses 64, 84 and 128 words. A 32x32x3
CIFAR-10 image does not fit.

## A complete inference

This sequence is run by `tb/tb_nmc_soc.sv`:

1. The core places the image and the weights/configuration in Memory 2, one
   16-bit value per 32-bit word.
2. SWC `000`: copy the image to IFM (ACC_ADDR = `0x000`, NRTX = 64).
3. SWC `000`: copy the weights to WGT (ACC_ADDR = `0x400`, NRTX = 84).
4. SWC `001`: start.
5. SWC `010`: copy OFM (ACC_ADDR = `0x800`, NRTX = 128) to Memory 1. The
   bridge holds this copy until the inference is done.
6. `dma_irq` fires. The core reads the 4x4x8 result (128 values) and runs the
   fully connected layer: ten sums of 128 products, one MAC each. The class is
   the output with the largest sum.

All four requests can be issued at once, because the DMA queues them. The
requests for the next image can follow straight away. The core then computes
one image's fully connected layer while the accelerator convolves the next.
Where the core and the DMA meet at one memory, the core goes first and the
DMA waits in the arbiter's buffer.

## Where this RTL departs or fills in

The thesis does not give the following details; they are choices made in this
RTL:

* The accelerator's internals. The original accelerator comes from another
  work. The engine here is the simplest one that does the stated operations:
  convolution, bias, ReLU and pooling.
* The number format (16-bit signed, shift by SH, saturation).
* Zero padding. This follows the network table, which keeps 8x8 after the
  convolution. The thesis's reference convolution loop has no padding.
* The memory layouts, the configuration words, the select encoding and the
  control word.
* The DMA register map, FIFO depth (4), overlap buffer and one-cycle irq
  pulse.
* Treating the stride as 2^BITSH words.
* The address map.
* The core having priority at every arbiter.
* The register file's details: combinational reads, one write port, and reset
  to zero.
* The opcodes of SWC and MAC.
* The stall on a full DMA queue.

The stated DMA rates are "read every third cycle, write every second". A
summary table in the thesis reads "2/3 clock cycles" for read/write. This RTL
follows the text.

The core is modelled as a single AHB master. The vendor core's pipeline and
fetch logic, its interrupt registers, the pads and the power domains are not
part of this RTL.

## Files and simulation

`rtl/` holds one module or package per file. The top is `nmc_soc`. Every block
has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb/ahb_tasks.svh` and `tb/cnn_ref.svh`
hold AHB master tasks and a reference model of the accelerator. The reference
model follows the engine's arithmetic but is written independently.

`tb_nmc_soc` runs the top at its default sizes. It plays the role of the
core. It does two inferences back to back, then a third transfer through the
register port. It checks every result against the model. On each result it
then runs the fully connected layer and the classifier as MAC instructions
through the register file, 2560 MACs in all, partly back to back. It checks
the ten sums and the class. The first image's fully connected layer must
finish while the accelerator is still busy with the second image. Last, it runs a 32x32 image with four filters,
which fills the input and output memories. The image is read from memory at a
stride of two words. The run takes 52,379 cycles: 3 per moved word plus
46,086 in the engine. It also counts the mechanisms, and each must occur:

* an SWC stall on a full queue
* the DMA buffered behind the core at an arbiter
* the bridge held while busy
* an SRAM write/read collision
* the interrupt
* an unmapped-address ERROR
* MAC write-back, including back-to-back MACs
* a hazard stall
* a strided (BITSH) transfer
* the core computing while the accelerator runs

It runs in well under a second.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -Itb -y rtl -y tb +libext+.sv rtl/ahb_pkg.sv rtl/nmc_pkg.sv \
  tb/tb_nmc_soc.sv --top-module tb_nmc_soc -o sim
./obj_dir/sim
```

Replace `nmc_soc` with any module name to run that block's testbench. The
testbenches initialise everything they read, and the RTL resets all control
state, so results do not depend on power-up values. The memories are plain
arrays that synthesis keeps as memories. For an ASIC they would be replaced
by compiled SRAM macros with the same native ports.
