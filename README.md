# Morphable many-core accelerator

This is an FPGA accelerator with up to 105 small processor cores. The cores
are not fixed: they are grouped into seven clusters, and each cluster is a
region of the FPGA that can be rewritten by partial reconfiguration while the
other six keep running. Each region holds one homogeneous cluster of one of
three core types, or nothing at all:

| configuration | code | live cores | core type (outside this RTL) |
|---|---|---|---|
| blank box | 0 | 0 | region switched off to save static power |
| Type A | 1 | 15 | basic integer core, no multiplier or barrel shifter |
| Type B | 2 | 12 | full integer core with multiplier and barrel shifter |
| Type C | 3 | 8 | full core plus a single-precision FPU |

So the whole accelerator holds between 56 and 105 live cores. A program on the
host sends work to single cores. Each core sends back a result word and a set
of performance counters: clock cycles, hardware multiplies, hardware FP
operations, and multiplies and FP operations done in software. From those
counters the host software can tell what a kernel needs. It then
reconfigures clusters to the best core type for the next piece of work, or
blanks them to stay under a power budget. That software decides; the RTL here
does everything underneath:

* the two-level stream network that carries work to each core and gathers
  results;
* the per-core controllers and their counters;
* cluster memories, the shared memory and its atomic words;
* the engine that moves a bitstream from flash into the FPGA configuration
  port and isolates the region while it is being rewritten.

The processor cores themselves (MB-LITE soft cores), the PCIe/DMA link, the
flash chip and the ICAP primitive are not part of the RTL. Their signals are
ports of the top module `morph_accel_top`, and the testbenches model them.

## Block diagram

```
 host DMA stream ──► axis_bridge (TDEST = word[31:28]) ──► port 15 ┐
 host DMA stream ◄──────────────────────────────────────── port 15 ┤ cluster network
                                                                   │ (axis_interconnect)
            ports 0..6 ◄──► processing_cluster 0..6 ◄──────────────┘
                               │
                               ├─ axis_bridge (TDEST = word[27:24]) ─► port 15 of the core network
                               ├─ axis_interconnect (core network), ports 0..14 ─► processing_core 0..14
                               │      processing_core = core_controller + scratch-pad sp_ram
                               └─ mem_interconnect: PE bus accesses ─► cluster memory (addr bit 31 = 0)
                                                                    └► shared memory    (addr bit 31 = 1)

 shared_memory_controller: mem_interconnect over 7 clusters ─► sp_ram (bit 30 = 0)
                                                            └► sync_registers (bit 30 = 1)

 host ctl_* registers ─► reconf_engine ─► flash_* (16-bit reads)
                                      └► sync_fifo (4 kB) ─► icap_* (32-bit writes)
                                      └► cluster_cfg / cluster_busy ─► each cluster
```

## Stream network and word format

Every word on the network is 32 bits:

```
 31     28 27     24 23                                   0
+---------+---------+--------------------------------------+
|cluster_id| core_id |              payload                 |
+---------+---------+--------------------------------------+
```

`axis_interconnect` is a light AXI-Stream switch with 16 ports, used twice
per level. Port 15 is the upstream port. It has two channels that do not
interact:

* **One-to-many (down).** The stream on `s_*[15]` goes to `m_*[TDEST]`. The
  path is purely combinational, and `s_tready[15]` is the ready of the chosen
  port. A word addressed to port 15 itself is dropped.
* **Many-to-one (up).** The `s_tvalid` of ports 0..14 are requests to
  `rr_arbiter`. The winner's stream goes out on `m_*[15]`. The grant is
  locked in two cases:
  * from the first accepted beat until the beat with `TLAST` is accepted;
  * while an offered beat waits for `TREADY`.

  So packets from different cores are never interleaved, and a valid word
  never changes. When a packet ends, the arbiter pointer moves to just after
  the winner.

The network has no TDEST wires between levels. Instead, `axis_bridge`
computes TDEST from the word itself:

* the bridge at the host picks the cluster from bits 31:28;
* the bridge at the top of each cluster picks the core from bits 27:24.

One configuration word from the host therefore reaches exactly one core
controller. Each bridge is one register stage in each direction, and it
keeps full throughput.

## Core controller

`core_controller` sits between the network and one processing element (PE).
It has four states:

```
WAIT ──(config word accepted)──► RELEASE ──(PE pulses cfg_read)──► RUN
 ▲                                  │                                │
 │                                  └────(PE pulses done)───────┐    │ (PE pulses done)
 └──────(last counter word accepted)──── SEND ◄─────────────────┴────┘
```

* **WAIT.** The PE is held in reset. The controller accepts one word and
  keeps bits 23:0 for the PE (`to_pe.cfg_word`).
* **RELEASE.** The PE leaves reset, boots and reads the word, then pulses
  `cfg_read`.
* **RUN.** The PE runs until it pulses `done`, with a 24-bit return value in
  `ret_msg`.
* **SEND.** The PE goes back into reset. The controller sends a 6-word
  packet:
  * the return value;
  * then the counters CLK, MUL, FP, SW_MUL and SW_FP.

  Each word has `{cluster_id, core_id}` in bits 31:24, and TLAST is set on
  the last word.

CLK counts every cycle in which the PE is out of reset. The event counters
add up the PE's one-cycle pulses `ev[3:0]`. All counters are 24 bits wide and
saturate. `slot_en` low means that the current configuration has no core in
this slot. The controller then stays in WAIT and throws away words sent to
it.

## Clusters and configurations

A `processing_cluster` always contains 15 core slots. Its 2-bit
configuration decides how many are live: 15, 12, 8 or 0. Slots above the
count are held in reset and drop their words. The configuration code is
also passed to every PE (`to_pe.pe_type`).

In the FPGA, a reconfiguration replaces the region's logic. Here it changes
the live-slot count. While a cluster is blank, or is being rewritten (its
`cluster_busy` bit is high), the whole cluster is in reset and isolated:

* words sent to it are accepted and dropped, so the shared cluster network
  can never stall behind a dead region;
* it sends nothing up.

The host learns about such drops only from the missing reply. After a
reconfiguration the cluster restarts from reset, so its cluster memory
contents are kept but the controllers are idle.

## Reconfiguration engine

`reconf_engine` holds the cluster configurations. The host drives it through
four 32-bit registers (`ctl_addr`, `ctl_we`, `ctl_wdata`, `ctl_rdata`; reads
are combinational):

| addr | name | meaning |
|---|---|---|
| 0 | COMMAND | write `{go[31], cluster[7:4], config[1:0]}`; reads back the last command |
| 1 | STATUS | bit 0 busy, bit 1 done, bit 2 rejected; write 1 to bit 1 or 2 to clear it |
| 2 | CONFIG | configuration of cluster i in bits 2i+1:2i |
| 3 | SIZE | byte size of the last bitstream loaded |

The engine runs one command at a time. It rejects a command that arrives
while it is busy, or that names a cluster that does not exist.

Flash layout: the bitstream for configuration `c` starts at 16-bit word
address `c << SLOT_SHIFT` (4 MB slots at the default). It begins with a
two-word header, the size in bytes with the high half first. The bitstream
data follows.

Sequence after a valid command:

1. `busy` is set, and the target cluster is isolated at once.
2. **HDR:** the engine reads the two header words.
3. **XFER:** it reads `size/2` data words as a pipelined burst. It makes one
   request per cycle while the flash grants and the FIFO has room for every
   word still in flight. Pairs of words are packed with the first word in
   bits 31:16 and pushed into a 1024×32 (4 kB) `sync_fifo`.
4. The FIFO feeds the ICAP whenever it is not empty. On each write,
   `icap_csib` and `icap_rdwrb` are low and `icap_i` carries the word.
5. **DRAIN:** once the last word has left the FIFO, the new configuration
   is recorded, `done` is set and `busy` is cleared, and the cluster comes
   out of isolation.

The flash port returns 16 bits per read, so the flash sets the speed; the
32-bit ICAP side is idle half the time. At one flash word per cycle and
100 MHz:

* a 2 MB bitstream takes about 10.5 ms;
* a 460 kB blank-box bitstream takes about 2.4 ms.

## Memory layer

The PEs use a second bus next to the stream network. A request is the
`mem_req_t` struct: `req`, `we`, `addr`, `wdata`. The master holds it until
`gnt` comes back. The answer arrives later as `mem_rsp_t`: `rvalid` and
`rdata`. A write is answered too, with the old word.

* Each core has a private scratch-pad (`sp_ram`, 4096 words) on its own
  `pe_lmem_*` port.
* Each cluster has a `mem_interconnect`: a round-robin shared bus from the
  15 PEs to two targets.
  * Word-address bit 31 = 0 goes to the cluster memory (1024 words).
  * Bit 31 = 1 goes out of the cluster to the shared memory controller.
* `shared_memory_controller` puts a second `mem_interconnect` across the
  seven clusters.
  * Bit 30 = 0 goes to the 16384-word shared memory.
  * Bit 30 = 1 goes to 16 `sync_registers`. A write to a sync register is an
    atomic swap: it returns the previous value, which is enough for locks
    and counters.

Each bus allows one access in flight. A new grant can be issued in the cycle
the previous answer arrives, so a bus with one-cycle targets moves one word
per cycle. Address bits above the RAM size are ignored, so addresses wrap.

## Top-level interface (`morph_accel_top`)

* `s_host_*` / `m_host_*`: AXI-Stream from and to the host DMA engine
  (TDATA 32, TLAST, TVALID, TREADY).
* `ctl_*`: the reconfiguration registers.
* `flash_req`, `flash_addr` and `flash_gnt`, with read data on
  `flash_rvalid` and `flash_rdata[15:0]`. Answers come back in request order,
  with any latency.
* `icap_csib`, `icap_rdwrb`, `icap_i[31:0]`.
* Per PE, indexed `[cluster][core]`:
  * `to_pe` (reset, configuration word, type) and `from_pe` (cfg_read, done,
    ret_msg, event pulses);
  * `pe_lmem_req/gnt/rsp` for the scratch-pad;
  * `pe_bus_req/gnt/rsp` for the shared bus.
* `cluster_active`: one bit per cluster, high when the cluster is live.

Everything runs on one clock `clk` with a synchronous active-low reset
`rst_n`. After reset the clusters take `INIT_CFG`: clusters 0–2 Type A, 3–4
Type B and 5–6 Type C. Packed arrays of structs carry the PE signals.

Parameters of the top (defaults): `N_CLUSTERS=7`, `MAX_CORES=15`,
`NUM_COUNTERS=5`, `LMEM_DEPTH=4096`, `CMEM_DEPTH=1024`, `SHARED_DEPTH=16384`,
`FLASH_AW=26`, `SLOT_SHIFT=21`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Two models in `tb/` are
used by the larger benches:

* `pe_model` stands in for a PE. It decodes the kernel from the
  configuration word, emits the matching event pulses for its core type,
  uses its scratch-pad, the cluster memory and a shared sync word, and
  returns a checkable value.
* `flash_model` is a flash with latency, stalls and headers; its data is a
  fixed function of the address.

To build and run one bench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/morph_pkg.sv tb/tb_morph_accel_top.sv --top-module tb_morph_accel_top
./obj_dir/Vtb_morph_accel_top +verilator+rand+reset+2
```

`tb_morph_accel_top` runs the full-size design (7 clusters × 15 slots, all
default parameters) through a benchmark in the style of the one the design
was evaluated with. The four kernels are integer vector sum, integer inner
product, FP vector sum and FP inner product, sent in chunks to every live
core. Between phases the bench reconfigures clusters to the best type for
the next kernel; the reconfigurations overlap with the other clusters'
work. It finishes with a blank-box phase that switches clusters off. It
counts, and requires at least once:

* packets and correct counter values;
* reconfigurations to every type;
* a rejected command;
* words dropped by a blank cluster and by a slot the configuration lacks;
* cores running while another cluster is being reconfigured;
* arbitration contention on every network and bus;
* back-pressure from the host.

It runs in under a minute. Its bitstreams are shortened to 460 bytes (blank)
and 2000 bytes (Types A, B, C); `tb_reconf_timing` covers the real sizes.

`tb_reconf_engine` checks the flash-to-ICAP transfer while the flash
stalls: every word, the order, the cycle budget and the register map.

Three further benches run the workloads the design was evaluated with:

* `tb_reconf_timing` loads a 2 MB cluster bitstream and a 460 kB blank-box
  bitstream through the engine at its default size. It checks every ICAP
  word. At 100 MHz it measures 10.49 ms and 2.36 ms, which is the flash read
  rate and nothing more.
* `tb_static_configs` runs the four kernels on the four static systems:
  7×A (105 cores), 7×B (84), 7×C (56) and 2A+2B+3C (78). It prints the
  cycles per kernel and checks which system is fastest for each kernel.
  The per-element costs of the PE model are illustrative: 1 cycle for
  integer add; 6 or 2 for a software or hardware multiply; 12 or 3 for
  software or hardware FP. Typical output:

```
7 x A     105 cores: kernel cycles 2576   12101  23531  23531   total 61739
7 x B     84  cores: kernel cycles 2920   5301   29111  29111   total 66443
7 x C     56  cores: kernel cycles 3935   7507   11079  11079   total 33600
2A+2B+3C  78  cores: kernel cycles 3074   15611  31141  31141   total 80967
best configuration per kernel: 30035 cycles
```

* `tb_blind_adaptation` closes the loop through the counters. A host model
  knows nothing about the kernels. It runs each cluster's first chunk on
  whatever configuration the cluster holds. It then reads FP, multiply or
  neither from the returned counters. Each cluster that holds the wrong type
  goes on a reconfiguration wait list, which is served one command at a time
  while the others keep working. The bench runs kernel orders 1-2-3-4 and
  1-3-2-4. The second order needs 25 reconfigurations instead of 18 and takes
  longer: 14.6k cycles against 12.6k, with short stand-in bitstreams.

## Where this design departs from the original system

* **The reconfiguration controller is an FSM, not a MicroBlaze.** The
  original static region runs a MicroBlaze program that polls a shared
  command memory and uses a DMA to move the bitstream. Here one state
  machine does the same sequence. The command/status words play the role of
  that shared memory, and the host-facing bus (AXI over PCIe) is reduced to
  the `ctl_*` register port.
* **Reconfiguration is modelled, not performed.** The engine streams real
  bitstreams to the ICAP pins. In the RTL, the effect of the new bitstream
  is the configuration code that selects how many slots are live.
* **Own choices where the original is silent:**
  * the port-15 upstream convention;
  * the bridges' TDEST rule;
  * the PE-side handshake (`cfg_read`, `done`, event pulses);
  * the 24-bit saturating counters;
  * the configuration codes;
  * the command and status register map;
  * the flash header and slot layout;
  * the bus protocol and address map;
  * the sizes of the cluster memory, the shared memory and the sync area;
  * dropping words to isolated clusters;
  * putting the shared memory on chip. It could equally sit in external
    DDR3 behind the same port.
* **Scratch-pad size.** The 16 kB per core is an estimate from the per-core
  block-RAM count (four 36 kb blocks) of the original implementation.

## Not in this RTL

* The processing elements: MB-LITE cores of Types A, B and C, with their
  multiplier and FPU options.
* The host-side hypervisor software that chooses configurations. Its
  policies are minimum execution time, a power ceiling, and minimum
  performance at least power.
* PCIe, DMA and the AXI bus IP.
* The flash chip, the ICAP primitive and the partial-reconfiguration
  floorplan. Power and area figures depend on that FPGA implementation and
  cannot be reproduced from RTL simulation.
