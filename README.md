# Coloured scratchpads for predictable real-time cores

Several application cores on one multicore SoC run real-time tasks. Each core
must be able to fetch code and data without interference from its
neighbours. This subsystem gives each of three cores a private scratchpad
memory (SPM), built from block RAM in the FPGA fabric of a Zynq
UltraScale+-class device. Tasks follow a three-phase model:

1. A DMA engine loads a task's code and data from DRAM into the scratchpad.
2. The core executes the task from the scratchpad only.
3. The DMA copies the results back (unload).

Each scratchpad is split into two halves. While a task runs from one half,
the DMA unloads the previous task from the other half and loads the next one.

Two hardware ideas make this work:

- **Dual porting.** Every scratchpad is a true dual-port RAM, with a separate
  AXI controller on each port. The core uses port A and the DMA uses port B,
  so they never compete for a RAM port or a controller, even in the same
  cycle.
- **Colour-bit removal.** The cores split the shared last-level cache by page
  colouring. Each core's pages therefore use one value of address bits 13:12.
  Without help, a core could reach only a quarter of its scratchpad. A small
  address translator on each core path deletes those two bits. A window four
  times the scratchpad's size then maps onto the whole scratchpad, through
  pages of a single colour.

## Structure

```
  HPM0 (dedicated core port) -+-> smc0 --> translator 0 --> ctrl 0 --> SPM 0 (2 MB)   port A
                              |        +-> ctrl 1 -------------------> SPM 0          port B
  LPD  (DMA port) ------------+        +-> smc3 -+-> ctrl 3 ---------> SPM 1 (512 KB) port B
                                                 +-> ctrl 5 ---------> SPM 2 (512 KB) port B
  HPM1 (port shared by two cores) --> smc1 -+-> translator 1 --> ctrl 2 --> SPM 1     port A
                                            +-> translator 2 --> ctrl 4 --> SPM 2     port A
```

The SoC has only two high-performance PS-to-fabric ports (HPM0, HPM1) for
three cores:

- The core with the 2 MB scratchpad has HPM0 to itself.
- The two cores with 512 KB scratchpads share HPM1.
- The third PS port, the low-power-domain port (LPD), is kept for the DMA
  engine.

| File | Role |
|---|---|
| `rtl/spm_axi_pkg.sv` | Bus widths, AXI4 channel structs (`axi_req_t`, `axi_resp_t`), burst-address function, base addresses |
| `rtl/axi_translator.sv` | Colour-bit removal on AW and AR addresses |
| `rtl/axi_bram_ctrl.sv` | AXI4 slave driving one RAM port |
| `rtl/spm_dpram.sv` | Dual-port, byte-writable scratchpad RAM |
| `rtl/axi_smc.sv` | AXI4 crossbar with address decoding |
| `rtl/axi_err_slv.sv` | DECERR responder used by the crossbar for unmapped addresses |
| `rtl/spm_pl_top.sv` | The subsystem: three scratchpads, six controllers, three translators, three crossbars |

All AXI buses use a 40-bit address, 128-bit data and 6-bit IDs. Channels
are carried as packed structs, one request struct and one response struct
per link.

## Address map

| PS address | Size | Goes to |
|---|---|---|
| `0xA000_0000` | 8 MB | SPM 0 through translator 0 (HPM0) |
| `0xB000_0000` | 2 MB | SPM 1 through translator 1 (HPM1) |
| `0xB020_0000` | 2 MB | SPM 2 through translator 2 (HPM1) |
| `0x8000_0000` | 2 MB | SPM 0, DMA port (LPD) |
| `0x8020_0000` | 512 KB | SPM 1, DMA port (LPD) |
| `0x8028_0000` | 512 KB | SPM 2, DMA port (LPD) |

Any other address on any port answers DECERR.

The 8 MB window at `0xA000_0000` is the original design's. The others are
this implementation's choice, placed inside the usual fabric apertures of
each port. The DMA windows are untranslated: the DMA sees each scratchpad as
one flat range, while the core sees it through its colour.

## The colour translator

A 4 KB page's colour is address bits 13:12. A core whose pages all have
colour c touches only addresses with those bits equal to c. The translator
turns a window address `a` into the scratchpad offset

```
offset = { a[IN_W-1:14], a[11:0] }      (zero above)
```

This is page number / 4, times 4 KB, plus the offset within the page.

- For the 2 MB scratchpad, `IN_W` = 23: an 8 MB window gives 21 offset bits.
- For the 512 KB scratchpads, `IN_W` = 21.

Example: `0xA002_3456` has colour 2 and maps to offset `0x00_8456`.

The four colours alias onto the same scratchpad. Each core should use only
its own colour, which the hypervisor guarantees; the hardware does not check
it.

The translator is purely combinational and adds no cycle. It changes only
the start address of a burst. That is exact, because an AXI4 burst never
crosses a 4 KB boundary, so every beat of a burst lies in the same page and
has the same colour. An assertion flags an INCR burst that breaks this rule.

## Scratchpad and its controllers

`spm_dpram` is a flat array of `BYTES/16` words of 128 bits with two
identical ports:

- Byte write enables on each port.
- Reads return the old word one cycle after the request (read-first).
- The output holds while the port is idle.
- If both ports write the same word in the same cycle, port B wins.

The two halves used by the load/execute pipeline are a software convention;
the RAM has no boundary between them.

`axi_bram_ctrl` serves one AXI4 burst at a time:

- Burst types FIXED, INCR and WRAP, of 1 to 256 beats.
- Narrow transfers and write strobes.
- It alternates between writes and reads when both are waiting.
- Reads are pipelined through the RAM's one-cycle latency. RREADY
  back-pressure stalls the next RAM read instead of buffering data.

Timing without back-pressure:

- An N-beat write takes its B handshake N+1 cycles after AW is accepted.
- An N-beat read delivers its last beat N+1 cycles after AR is accepted.

Responses are always OKAY. Address decoding is left to the crossbars.

## Crossbars

`axi_smc` connects `N_S` masters to `N_M` address windows (base and size
parameters). Each output has two locks, one for writes and one for reads.

- A request that finds its output's lock free is granted in the next cycle,
  in round-robin order among the inputs.
- After the grant, the AW/W/B (or AR/R) channels are connected
  combinationally.
- The lock is released on the B handshake or on the last R handshake.

Each input has at most one write and one read in flight. Traffic to
different outputs runs in parallel. On `smc0`, the HPM0 core and the DMA
reach SPM 0 through different outputs, so neither delays the other. An
address that matches no window goes to an internal responder, which takes
all W beats and answers DECERR, or returns LEN+1 DECERR beats with RLAST.

One cycle is added through a crossbar. The end-to-end latency of a 16-beat
core read on HPM0 is 19 cycles, whether or not the DMA is working on the same
scratchpad.

## Testbenches

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops through
a watchdog if the design hangs.

| Testbench | What it checks |
|---|---|
| `tb_axi_translator` | The example above; 2000 random requests against an arithmetic model (page / 4); that all other fields pass through in the same cycle; that each colour reaches all 512 pages of 2 MB exactly once |
| `tb_spm_dpram` | 20,000 random cycles of both ports (reads, byte writes, same-word collisions) against a reference model |
| `tb_axi_bram_ctrl` | 16-beat write and read timing (17 cycles each) and single-beat reads (2 cycles); 600 random FIXED/INCR/WRAP bursts, full and narrow, with random strobes, W gaps and RREADY stalls; a simultaneous write and read |
| `tb_axi_smc` | Parallel writes to different outputs take no longer than one alone; two masters on one output are serialised; DECERR on writes and reads; 300 concurrent random bursts per master |
| `tb_spm_pl_top` | The whole subsystem at its default sizes. See below |
| `tb_dma_copy_1mb` | A 1 MB DMA load filling the upper half of the 2 MB scratchpad, while the core keeps reading the lower half. Core reads take 19 cycles both during the copy and alone. The copy takes 77,824 cycles (19 per 16-beat burst). Afterwards the new half is read through a second colour window and partly unloaded |

`tb_spm_pl_top` drives three AXI master models in place of HPM0, HPM1 and
LPD. It runs rounds of an anomaly-detection task set, with the code+data
sizes of real detectors:

- Core 0 runs NFER (about 318 KB, two jobs).
- Core 1 runs Spike and Spectrum.
- Core 2 runs Level, Clipping and Voter.

In each round:

1. The DMA loads each task image into one partition.
2. The core reads the whole image through its coloured window and writes a
   256-byte result record.
3. The DMA reads the record back.

Meanwhile the DMA loads and unloads the other partition. Each of these
events is counted, and a failure is counted if one never occurs:

- core/DMA overlap on each scratchpad;
- translated accesses from each window;
- DMA accesses to each scratchpad;
- concurrent core and DMA traffic through `smc0`;
- colour aliasing;
- DECERR on each port.

It takes about 75,000 cycles and well under a second.

Run it with plain Verilator 5 from the repository root. The package must come
first:

```
verilator --binary -j 4 -Wno-fatal --top-module tb_spm_pl_top \
  rtl/spm_axi_pkg.sv rtl/axi_err_slv.sv rtl/axi_smc.sv rtl/axi_translator.sv \
  rtl/axi_bram_ctrl.sv rtl/spm_dpram.sv rtl/spm_pl_top.sv \
  tb/axi_master_bfm.sv tb/tb_spm_pl_top.sv
./obj_dir/Vtb_spm_pl_top
```

The other testbenches are built the same way, with their own top module and
the files they use. Verilator simulates two-state logic and may start
memories at random values, so the testbenches write every word before reading it back.

## What lies outside this RTL

The subsystem is only the fabric side of a larger system. The rest is
processor hard IP or software, and appears here only as AXI traffic on the
three ports:

- The Cortex-A53 cores and their shared cache.
- The PS interconnect that lets two cores share HPM1.
- The PS DMA engine, and the Cortex-R5 that schedules it by fine-grained
  TDMA: in the case study each core gets a 100 µs slot in a 300 µs round.
- DRAM.
- The hypervisor, which does the cache colouring, inter-core interrupts and
  relocation of tasks between DRAM and scratchpad.
- The RTOS with its task states.

## Departures and own choices

- **Bus widths and ID width** (40/128/6) are chosen here.
- **Wiring of the DMA paths.** Which crossbar carries the DMA traffic to each
  scratchpad is this design's reading of the block diagram: SPM 0 directly
  from `smc0`, SPM 1 and SPM 2 through `smc3`.
- **Crossbars.** The original uses vendor AXI interconnect IP; the crossbar
  here is a simple replacement with the same function. Its arbitration,
  locking and one-cycle grant are this design's choices.
- **Controllers.** The original uses vendor block-RAM controllers. The
  controller here, and its 1-cycle read latency and N+1 write timing, are
  this design's choices.
- **Translator cost.** The original translator costs a small number of
  flip-flops and LUTs (about half a percent of the design). This one has no
  registers and costs only the address multiplexing: it is pure rewiring.
- **Contention.** The original system shows some slowdown of
  memory-intensive tasks while the DMA is active. That contention arises in
  the PS interconnect and DRAM, which are not modelled here. Inside this
  subsystem, the core's timing does not depend on DMA traffic.
- **Same-word collisions.** The winner of a same-word write collision
  between the two RAM ports is defined here (port B). Block RAM leaves it
  undefined.
- **Colour ownership.** Nothing in the hardware checks that a core uses only
  its own colour.
- **Clocking.** All logic runs on one clock with an active-low asynchronous
  reset.
