# HIGIPS: a pipeline of shared-bus multiprocessors for image processing

HIGIPS (High-speed General-purpose Image Processing System) handles a stream of
video frames. It combines two kinds of parallelism:

- **Pipelining across stages.** The system is a chain of *N* processing stages.
  Each stage applies one part of an image-processing task, so *N* frames are in
  flight at once.
- **Multiprocessing within a stage.** Each stage is a small multiprocessor of
  *M* 16-bit CPUs. They share a common bus and each has a large private memory.
  The CPUs split the frame that their stage is working on.

Frames move between stages without being copied. Between every pair of
neighbouring stages sits a **memory module** (MM) with two 256 KB image blocks.
Bus switches connect one block to the stage before the module and the other
block to the stage after it, then swap them. A frame that one stage has just
written is therefore, after the swap, the input of the next stage.

The RTL here covers all the board logic of that machine:

- the memory modules with their bus switches and start-up ROM;
- the per-CPU board logic: local DRAM controller, common-bus arbitration and
  drivers, I/O decoding and reset;
- the priority resolution of each stage's common bus;
- the two system-wide circuits that synchronise the stages and restart them.

The CPUs themselves, the frame digitiser, the frame buffer, the GP-IB
controllers and the host computer are commercial parts. They are not in the
RTL: their buses and control lines are ports of the top module `higips`.

```
 camera -> PIC ==> MM1 ==> PM1 ==> MM2 ==> PM2 ==> MM3 ==> PM3 ==> MM4 ==> POC -> display
                  (upper)  (own) (upper)  (own)  ...                (own)
 PIC/POC: input / output controller boards     PMk: stage k, M CPU boards on one common bus
 MMk: memory module k (blocks M1, M2, start-up ROM)
```

Defaults follow the prototype: N = 3 stages and M = 2 processing elements (PEs)
per stage. Each PE has 512 KB of local DRAM. Each memory module has
2 x 256 KB of SRAM and a 16 KB start-up ROM.

## The processor's address space

Every CPU sees the same 1 MB memory map:

| Address         | What                                                        |
|-----------------|-------------------------------------------------------------|
| 00000h - 7FFFFh | Private local DRAM (512 KB), on the CPU's own board          |
| 80000h - BFFFFh | Common memory block M2 (256 KB), over the stage's common bus |
| C0000h - FFFFFh | Common memory block M1 (256 KB), over the stage's common bus |

Address bit A19 alone selects local or common memory. Each stage has one common
bus. Two memory modules hang on it:

- the stage's **own** module, on that module's own port;
- the **next** module, on that module's upper-neighbour port.

At any moment each common address reaches exactly one of the four blocks of
those two modules. The phase decides which one.

## The time-shared dual-port memory module (`kit_ta2`)

A memory module has two ports:

- the **own port**, connected to the stage after the module;
- the **upper port**, connected to the stage (or input unit) before it.

It holds two SRAM blocks, M1 and M2. A block is never connected to both ports at
once. `bus_switch_ctrl` makes the port enables, and there is one instance of it
per port:

| Phase (MAMB_n / MBMA_n) | Own port            | Upper port          |
|-------------------------|---------------------|---------------------|
| A (L / H)               | M1 at C0000h-FFFFFh | M2 at 80000h-BFFFFh |
| B (H / L)               | M2 at 80000h-BFFFFh | M1 at C0000h-FFFFFh |

The upper port's decoder reverses the block select: it uses !A18 where the own
port uses A18. So in phase A:

- the stage before the module writes its result to 80000h;
- the stage after it reads its input from C0000h.

Both land in the right block. A stage therefore always finds its input at
C0000h of its own module in phase A, and at 80000h in phase B. It always writes
its output to the other half of the next module.

An access to the half that is switched away in the current phase gets no answer
on that port. The design leaves it to software to use the right half for the
phase. The module checks with an assertion that no block is used by both ports
in one cycle.

Inside each block (`sram_bank`) are four pairs of 32K x 8 chips. `cm_chip_select`
decodes A17..A16 to pick a pair, and A0 and UBE_n to pick the byte lanes.

### Start-up ROM and ET

After power-on every CPU copies a monitor program from a 16 KB start-up ROM
(`crom`) into its local memory. While the signal ET_n is high (start-up mode):

- the ROM answers every common address on the own port;
- the image memory blocks of all modules are switched off.

ET_n goes low, and stays low until the next reset, at the first moment all
sub-controllers ask for phase A (see below). The ROM contents are loaded from a
hex file named by the `CROM_FILE` parameter. An unloaded ROM reads FFFFh.

## Synchronising the stages (`stage_sync`) and restarting them (`restart_ctrl`)

Each stage has one master CPU, the sub-controller (SUBC), at bus position 0.
Two of its parallel-port lines are system-wide:

- **PB1 (phase request).** `stage_sync` is a wide Muller C-element:
  - all PB1 low gives phase A;
  - all PB1 high gives phase B;
  - any mix holds the current phase.

  A stage that has finished with its frame moves its PB1 to the level of the
  next phase. The swap of every memory module happens in the one clock after
  the slowest stage agrees. The same flip-flop makes MAMB_n and MBMA_n for all
  modules, so they cannot disagree.
- **PB0 (halted).** A SUBC lowers PB0 when it halts at the end of its work.
  `restart_ctrl` raises NMI to all SUBCs when every PB0 is low, and clears it
  when every PB0 is high again. This is an RS flip-flop.

A typical frame period:

1. SUBCs start by NMI.
2. The stages process.
3. Each SUBC flips PB1 and then lowers PB0.
4. The phase changes.
5. NMI restarts all stages on the new frames.

## One CPU board (`kit_ta1`)

Each PE, and also the input and output controllers, is a CPU board. The RTL
board is everything between the CPU's synchronous request/ready bus
(`cpu_req_t` / `cpu_rsp_t` in `higips_pkg`) and the outside world.

**Local DRAM (`dram_ctrl`, `dram_array`).** The memory is sixteen 256K x 1
chips with a multiplexed 9-bit address:

- the row is word-address bits A9..A1;
- the column is A18..A10.

The controller steps through ROW (RAS_n falls), COL (the multiplexer switches,
and the CAS_n of each enabled byte falls, with CASL_n for A0 = 0 and CASH_n for
UBE_n = 0), then two clocks of precharge. It returns to ROW directly if another
request is waiting, so back-to-back accesses take 4 clocks. At a 16 MHz clock
this meets the 120 ns chips' RAS, CAS and precharge minimums.

Refresh requests from the CPU's refresh unit (the `refresh` input) become
RAS-only cycles on an internal row counter. They take priority over a waiting
access. `dram_array` models the chips as a synthesizable array: it latches the
row on the RAS falling edge and reads and writes per byte lane on CAS.

**Common-bus arbitration (`bus_if`, `bus_priority`).** A cycle with A19 = 1
requests the common bus (BREQ_n). `bus_priority` is the stage's
priority resolver: an 8-to-3 priority encoder followed by a 3-to-8 decoder that
drives one BPRN_n line.

- The SUBC (index 0) has the highest priority.
- With no request, no line is granted.

A board that sees BPRN_n low owns the bus for exactly one clock. It drives
address, byte enables, direction and data, and the CPU's READY rises. It then
releases the bus, so every common-bus word is arbitrated separately and a busy
bus only stalls a CPU word by word. The stage ORs the drivers of all boards.
The stage also checks with an assertion that at most one board owns the bus.

**I/O decoding (`io_decode`).** This implements the board's chip-select logic:

- the GP-IB controller at an I/O address with A8 = A4 = 1;
- the parallel interface with A8 = 1 and A4 = 0;
- the data-direction line of the GP-IB transceivers;
- READY, which is immediate for local and I/O cycles and waits for AEN on
  common-bus cycles.

The board additionally holds READY for local cycles until the DRAM is done.

**Reset (`reset_ctrl`).** There are two reset sources:

- the power-on reset;
- a change-over reset switch. An RS latch, set by one contact and cleared by
  the other, removes its bounce.

Both are synchronised. The reset is held for `RST_CYCLES` clocks after its
source ends.

## Simulating

Everything is plain SystemVerilog-2017 for Verilator 5. The package must come
first on the command line:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/higips_pkg.sv $(ls rtl/*.sv | grep -v higips_pkg) tb/tb_higips.sv \
  --top-module tb_higips -o sim
./obj_dir/sim
```

Replace `tb_higips` with any `tb/tb_<block>.sv` to run one block's test. Run
from the repository root: `tb_crom` and `tb_kit_ta2` read `tb/crom_test.hex` by
that relative path. That file holds 32 words; word *i* is
`A5C3h ^ (i * 1357h)`. Every testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog.

`tb_higips` runs the full default configuration: 3 stages x 2 PEs, four memory
modules, 512 KB of DRAM per board. It plays every CPU:

1. Every CPU copies the start-up ROM into local DRAM.
2. The SUBCs release start-up, and phase A begins.
3. For six phases, the input controller writes a new 320 x 20-byte frame into
   MM1. The two PEs of each stage copy their halves of the frame into DRAM,
   transform them, and write them into the next module. The three stages apply
   x XOR 00FFh, then x + 3, then a 1-bit rotate. The output controller reads the
   frame that left MM4.
4. The SUBCs hand over with PB1, halt with PB0, and are restarted by NMI.

Every frame that reaches the output is compared with the three operations
applied in order. The test also counts ROM reads, bus-contention stalls, phase
changes in both directions, phases held while stages disagree, NMIs, DRAM
refreshes and GP-IB and parallel-port selects. It fails if any of these never
happens. It takes about 15 s to build and under a second to run.

`tb_block_transfer` runs the workload the stage was measured with. Seven
stages run side by side, with 1 to 7 elements. Each stage receives images 320
bytes wide and 20 to 200 lines high in its memory module. Every element copies
its horizontal strip, with one overlap line above and below, from common memory
into local DRAM. All elements compete for the bus. Every word is then read back
and compared.

On the full 320 x 200 image, every element then runs the four kinds of
processing the stage was evaluated with. It works on its own lines, from its
local copy, and takes neighbour pixels from the overlap lines:

- 3 x 3 smoothing (mean);
- sharpening (5c - n - s - e - w);
- Laplacian edge detection (|4c - n - s - e - w|);
- the gray-level histogram.

Results are clipped to 0..255, and image border pixels pass through. Each
element writes its result lines and its 256 histogram counts into the next
module. In the next phase the testbench checks the three output frames and the
sum of the partial histograms there. This is the flow of the stage's
processing: copy to local memory, process locally, then output to the next
stage.

The test prints a table of clocks per word for each element. The sub-controller
keeps the same rate, about 5 clocks per word, whatever the number of elements,
because it has the highest bus priority. From about 6 elements the bus
saturates, and the lowest-priority elements slow down to 9 to 40 clocks per
word. The test checks both effects.

The block tests use smaller parameters where the size does not matter, for
example `tb_ppu` runs a stage with M = 4.

## Sizes and parameters

| Parameter (top)   | Default | Meaning                                                  |
|-------------------|---------|----------------------------------------------------------|
| `N`               | 3       | pipeline stages                                          |
| `M`               | 2       | PEs per stage, 1..8 (the priority encoder has 8 inputs)  |
| `LM_ROW_BITS`     | 9       | local DRAM = 2^(2*bits) words = 512 KB                   |
| `CHIP_WORDS`      | 32768   | bytes per SRAM chip; block = 8 chips = 256 KB            |
| `CROM_WORDS`      | 8192    | start-up ROM words (16 KB)                               |
| `CROM_FILE`       | ""      | `$readmemh` file for the ROM; empty reads FFFFh          |
| `RST_CYCLES`      | 16      | reset stretch                                            |

A 320 x 200-byte grey frame (64,000 B) uses a quarter of a 256 KB block. A
640 x 400 grey frame (256,000 B) is the largest that fits in one block. An RGB
frame of that size (768,000 B) does not fit.

## Where this RTL departs from the boards, and why

- **One clock.** The boards run the CPU and DRAM logic from a 16 MHz clock
  and the common bus from a 10 MHz clock. Here everything is on `clk`, with one
  common-bus word per clock. The DRAM timing table above assumes 16 MHz.
- **Clocked strobes.** The DRAM strobe sequence and the SRAM/ROM enables are
  made with gate delays and asynchronous memory chips on the boards. Here they
  are synchronous:
  - SRAM, DRAM and ROM reads are combinational;
  - writes happen at the clock edge.
- **CPU bus abstraction.** The CPU's multiplexed, status-decoded bus is
  replaced by a demultiplexed request/ready struct. The address latches and
  data transceivers, which only latch and buffer, are therefore gone.
  Instead, the structs are routed and the common-bus drivers are ORed.
- **Bus ownership per word.** The commercial bus arbiter on the boards is
  replaced by the simplest behaviour that matches its role: request, grant,
  one word, release.
- **Phase A/B block mapping.** The own port uses M1 in phase A and the upper
  port uses M2. This is the mapping under which each stage reads its input
  at C0000h in phase A and the frame flow described above works.
- **End of start-up mode.** ET ends at the first all-PB1-low condition after
  reset. The boards set it from a power-on preset; this condition is the
  simplest reading of "the ROM is disconnected once the system is steady".
- **NMI clear.** The boards give only the set condition, all PB0 low. Here
  NMI is cleared when all PB0 are high again.
- **DRAM row/column split and refresh counter.** These are this design's own
  choices.

## What is not in the RTL

- The CPUs and their on-chip peripherals: the refresh timer, the serial port
  and the interrupt controller.
- The GP-IB controller and the parallel interface chip: only their chip
  selects are generated.
- The RS-232C port and the bus-status decoder.
- The frame digitiser and the frame buffer of the input and output units, and
  their interface boards.
- The host computer.
- The clock oscillators.

At the top, the input and output units are therefore just a CPU board
(`pic_*`, `poc_*` ports) on the upper port of the first module and the own port
of the last.
