# Run/stop debug for a multiple-clock SoC: stopping on handshakes, not on clock cycles

In a system on chip built from blocks with unrelated clocks, there is no clock
edge at which every block can be sampled safely, and the number of cycles a
transfer takes between two clock domains changes from run to run. Stopping such
a chip "at cycle N" and reading its flip-flops gives a different, and often
meaningless, picture every time.

This RTL implements the CSAR way around that (Communication-centric,
Scan-based, Abstraction-based, Run/stop). Time is counted in **handshakes**,
the cycles where a word actually moves across a port, instead of clock cycles:

* a **monitor** on each port counts handshakes and raises a debug event on a
  programmed one (a breakpoint "at the 60th request of tile 1");
* an **event distribution interconnect (EDI)** carries that event into every
  clock domain;
* a **protocol-specific instrument (PSI)** on each port then blocks further
  handshakes. A block that cannot send or receive stalls, so its state stops
  changing and can be read on any clock. A word is then always either still at
  its sender or already at its receiver, never half-transferred, lost or
  duplicated, so the states of all blocks are consistent with each other;
* from the stopped state, the debugger can let chosen ports advance a given
  number of handshakes (**step**). This forces one order of requests at a shared
  arbiter, which guides the system towards the run that shows an error
  (**guided replay**).

Everything is programmed and read through an IEEE 1149.1 TAP.

The approach, and the example system, follow the published CSAR debug work
("Interactive debugging of systems on chip with multiple clocks"). Most of the
internals (port protocol, register map, crossing circuit, interconnect) are
this design's own choices. The publication describes these parts only by what
they do. Each choice is marked below and in the header comment of its file.

## The example system

```
      core 1 (3 ports out)   core 2            core 3 (clocked with the network)
        I         D            I      D          I      D
      [TCIM]   [TCDM]       [TCIM] [TCDM]     [TCIM] [TCDM]     tile clocks clk_tile[0..2]
      M--P      M--P         M--P   M--P       M--P   M--P
        |         |            |      |          |      |
      [CDC]     [CDC]        [CDC]  [CDC]      [CDC]  [CDC]
  =====================  interconnect (clk_noc), 2 arbiters  =====================
                  [CDC]                                [CDC]
                  M--P                                 M--P
                 [CMEM]  clk_cmem                     [DMEM]  clk_dmem

  M = monitor, P = PSI, CDC = clock domain crossing; EDI, TAP and debug registers not drawn
```

`csar_soc` has three processor tiles, a code memory tile (CMEM) and a data
memory tile (DMEM). The processor cores are **not** part of this RTL. Each
tile's instruction and data port (`cpu_i_*`, `cpu_d_*`, index = tile) comes
out of the top for a core, or for a testbench model of one. Tile 3 is meant to
run synchronously with the interconnect, so drive `clk_tile[2]` from `clk_noc`.
The crossings are still present on tile 3's links.

Word addresses are 16 bits, data 32 bits (`csar_pkg`):

| addr[15:14] | goes to                                   |
|-------------|-------------------------------------------|
| 00          | the tile's own TCIM / TCDM (not debugged) |
| 01          | CMEM                                      |
| 1x          | DMEM                                      |

The eight debugged ports are numbered as follows:
0/1 = tile 1 instruction/data, 2/3 = tile 2, 4/5 = tile 3, 6 = CMEM, 7 = DMEM.

## Ports and what counts as a handshake

Every link is a pair of valid/accept channels: a request (`req_t`: addr, we,
wdata) and a response (`rsp_t`: rdata). A transfer happens in the one cycle
where valid and accept are both high. Every request, including a write, gets
exactly one response. A memory returns the word's old contents.

The single-cycle transfer is what makes the PSI safe. The PSI masks valid
towards the receiver and accept towards the sender in the same cycle, so it
never splits a transfer. It may withdraw a valid that an initiator had raised.
The blocks here do not rely on valid staying high once raised. If you attach IP
that asserts an AXI-style "valid stays until ready" rule, put the PSI where that
rule is not checked, or change it to close only between transfers.

## Clock domain crossing (`cdc_hs`, `cdc_port`)

Each crossing is a four-phase handshake:

1. The sending side registers the word and raises `x_valid`. It then accepts
   nothing more.
2. The receiving side sees `x_valid` through two flip-flops and samples the held
   word. The word is stable for as long as `x_valid` is high. The receiving side
   then puts the word in its output register and raises `x_accept`.
3. The sending side sees `x_accept` and drops `x_valid`.
4. The receiving side sees `x_valid` low and drops `x_accept`. The sending side
   sees that and becomes ready again.

A `cdc_port` is one such crossing for requests and one for responses. A word
appears about three destination cycles after it is taken. The sending side is
busy for about two synchronizer round trips, so throughput is low. That is
acceptable for this debug-oriented system, but it is not a high-bandwidth
crossing. An assertion checks that the receiving side holds its output stable
while it is not accepted.

## Monitors and breakpoints (`monitor`)

A monitor watches one port on the core side of its PSI (the network side in a
memory tile). It counts handshakes on the request channel, or on the response
channel if `chan_rsp` is set, in a 16-bit counter. Every request gets exactly
one response, so counting responses counts completed transactions. With `enable`, the monitor
raises `evt` on the clock edge of the handshake whose number equals `bp_count`.
`evt` stays high until the monitor is reprogrammed. A new configuration with
`clear` resets the count. Without `clear` the count continues, so a breakpoint
can also be placed relative to the current count.

Conditions across several monitors and points in time use a second event,
**arm**. A monitor with `arm_out` raises `arm` instead of `evt` on its
handshake. `arm` stops nothing; the EDI carries it to every monitor. A monitor
with `arm_wait` counts only while the distributed arm event is present. For
example, "stop at tile 1's 15th request after tile 2's 20th" is:

* monitor 3 (tile 2 data): `arm_out`, `bp_count` 20;
* monitor 1 (tile 1 data): `arm_wait`, `bp_count` 15.

The arm event reaches the other clock domains through the same two-flip-flop
synchronizers as the stop event, 2-3 of their cycles after the arming
handshake. The waiting monitor counts from the arrival, so a handshake made in
that window is not counted. In the example, tile 1 stops on its 15th request
after the arm event reached tile 1.

There is one arming stage, and the only condition a monitor tests is a
handshake number. Data matches and longer sequences are not built.

## Stopping, stepping and guided replay (`psi`)

A PSI is closed when any of these holds:

* its mode is `PSI_STOP`;
* its mode is `PSI_STEP` and its step counter is zero;
* `event_en` is set and either its own monitor's event (`evt_local`, same clock)
  or the distributed event (`evt_global`) is high.

When it is closed by STOP or by an event, both channels are blocked. In STEP
mode the response channel stays open, so that stepped requests can complete.
`steps_left` counts down on each request that passes.

**How exactly a breakpoint stops**:

* **The breakpoint port.** The monitor's event is registered on the edge that
  ends handshake N, and its own PSI closes from the next cycle on. Handshake N
  passes and handshake N+1 does not, whatever the clocks are.
* **Every other port.** The event crosses into that port's clock through two
  flip-flops. Those ports stop 2-3 of their own cycles later, at a point that
  depends on the clock phases. This is the remaining non-determinism of the
  method. It now affects whole transfers (a request is either through or not),
  not individual bits.

After the stop, wait until the system is quiet. Words already inside crossings
and the interconnect finish their way to the next closed PSI. The PSI status
reports `stopped` and `blocked` (a request is waiting at the closed port).

**Guided replay** uses the same instruments:

1. Set every PSI to `PSI_STOP` with `event_en = 0`, so that they stay closed
   when the event goes away.
2. Reprogram the monitor to clear the event.
3. Open the ports that must serve, for example the memory tiles, with `PSI_RUN`.
4. Give chosen ports `PSI_STEP` with a count.

For example, stepping tile 2's data port by 3 and only then tile 1's by 1 makes
tile 2's three reads reach the shared memory before tile 1's write, whatever
the clock frequencies.

## Event distribution (`edi`)

The events of all eight monitors are ORed and synchronized into each of the five
PSI clock domains: tile 1-3, CMEM, DMEM. Each event is also synchronized into
`tck`, so the debugger can read which monitor fired. Events only rise between
reprogrammings, so the OR cannot create a pulse that a destination would keep.
A second channel of the same structure carries the monitors' arm events to
the monitors of all five domains.

## Debugger access (`tap_ctrl`, `dbg_regs`)

`tap_ctrl` is a standard 1149.1 controller with a 4-bit IR: IDCODE `0001` (the
value after reset, `32'h0C5A_1001`), BYPASS `1111`, and DBG `1000`. DBG selects
a 39-bit data register in `dbg_regs`, shifted LSB first:

```
 bit 38   37..32   31..0
 wr       addr     data
```

Update-DR stores `addr` and, if `wr` is set, writes `data` to that register.
Capture-DR loads `{0, addr, contents of the last stored addr}`. A read
therefore takes two scans: one to set the address, one to fetch the value.

| addr      | write                 | read                                             |
|-----------|-----------------------|--------------------------------------------------|
| 0-7       | monitor i `mon_cfg_t` | `{evt, arm, 14'b0, count[15:0]}`                 |
| 8-15      | PSI i `psi_cfg_t`     | `{stopped, blocked, 14'b0, steps_left[15:0]}`    |
| 16        | -                     | events that fired, one bit per monitor           |
| 32-39     | -                     | monitor i configuration                          |
| 40-47     | -                     | PSI i configuration                              |

`mon_cfg_t` = `{arm_wait[20], arm_out[19], clear[18], chan_rsp[17], enable[16], bp_count[15:0]}`.
`psi_cfg_t` = `{event_en[18], mode[17:16] (0 run, 1 stop, 2 step), step_n[15:0]}`.

Each configuration register has a toggle flag. A write flips the flag.
`pulse_sync` in the instrument's clock turns each flip into a load strobe, and
the instrument then copies the configuration word, which is stable by then.
Writes to the same register must be at least three of the instrument's cycles
apart. One scan is about 45 `tck` cycles, which satisfies this easily.

Status is captured in `tck` without synchronizers. This is the CSAR argument
applied to the debug logic itself: read it while the ports are stopped, when it
no longer changes. A read while traffic flows may return a mixed value.

### A breakpoint session

1. Load IR = DBG.
2. Write monitor 1 = `{clear 1, enable 1, bp_count 60}`.
3. Write each other monitor with `clear 1, enable 0`.
4. Write each PSI = `{event_en 1, RUN}`.
5. Start the cores.
6. Poll register 16 until bit 1 is set, then wait until the system is quiet.
7. Read the monitors and PSIs. Read the rest of the state by your own means:
   the CSAR work uses the manufacturing scan chains, which are not part of this
   RTL.
8. Step as described above, or write all PSIs to RUN to resume.

## Memories and interconnect

* `tcm`: a tile's TCIM/TCDM. A local address is served from a single-port array
  (default 1024 words) one cycle after the request. Any other address is
  forwarded to the PSI, and its response is handed back. Only one transaction
  is in flight at a time. Because the memory sits before the PSI, a core can
  hand one more request to its TCM after its port has closed. That request
  waits in the TCM.
* `shared_mem`: the CMEM/DMEM array (default 4096 words). It accepts a request
  when no response is waiting.
* `noc`: the interconnect. The CSAR example uses a packet-switched network on
  chip from earlier work that is not described there. This block is a
  **stand-in** with the same function: a crossbar in the network clock with one
  round-robin arbiter per memory tile. Each memory tile serves one transaction
  at a time and routes the response back to its owner. `noc_contention` flags
  cycles where several ports wait for the same free memory tile. These are the
  arbitrations whose outcome depends on timing, and stepping controls them.

## Where this departs from the CSAR example

* **Not built:**
  * the processor cores;
  * the manufacturing scan chains used to read the state;
  * the original network on chip (a crossbar stands in for it);
  * event conditions other than a handshake count, and sequences longer
    than one arming stage.
* **Extra links not built.** The example's floor plan shows one more clock
  domain crossing per tile than the two network ports need: a third per
  processor tile and a second per memory tile. Each is drawn linking a
  monitor (the data-side one in processor tiles) to the network. What travels
  over that link is not given, so these crossings are not built; monitors
  are programmed and read through the TAP only.
* **Tile 3.** It is described as synchronous with the network, yet drawn with
  crossings. The crossings are kept, and tile 3 is clocked from the network
  clock.
* **Sizes are this design's own.** None are given in the source: widths,
  memory sizes, counter widths, the register map and the crossing circuit.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
          rtl/csar_pkg.sv tb/tb_csar_soc.sv --top-module tb_csar_soc
./obj_dir/Vtb_csar_soc
```

| testbench       | what it establishes |
|-----------------|---------------------|
| `tb_cdc_port`   | 300 words each way, unrelated clocks, random back-pressure: nothing lost, duplicated or reordered |
| `tb_monitor`    | count equals a reference on every cycle; event exactly at handshake N; channel select, clear, disable; arm event and counting only after arming |
| `tb_psi`        | no transfer while stopped; STEP passes exactly N; local and global events stop it; both sides always agree |
| `tb_edi`        | every source reaches every domain in 2-3 of its cycles; the fired mask in `tck`; the arm channel likewise, without touching the stop channel |
| `tb_tap_ctrl`   | IDCODE, IR capture `0001`, BYPASS, DBG strobes, TMS reset |
| `tb_dbg_regs`   | all writes, toggles, status and read-back registers |
| `tb_tcm`, `tb_shared_mem` | data against reference models, one-cycle local latency |
| `tb_noc`        | six initiators, two targets: every response reaches its owner; contention occurs |
| `tb_proc_tile`, `tb_mem_tile` | breakpoint, stop, step and resume within one tile |
| `tb_csar_soc`   | the whole system at default sizes (below) |

`tb_csar_soc` runs a producer/consumer FIFO in DMEM. Behavioural core-port
models (`tb/cpu_model.sv`) play the cores: tile 1 writes items, tile 2 polls
for them, tile 3 initialises the memories, and all instruction ports fetch
locally and from CMEM.

It runs two clock settings:

* all clocks at 2,000,003 fs;
* tile 1 at 3,000,016 fs and tile 2 at 5,000,011 fs.

For each setting it uses breakpoints on tile 1's data requests 60, 70, 80, 90
and 100. All programming and status reads go through the TAP. The bench reads
the memory contents directly, in place of the scan chains. For every
breakpoint it checks that:

* the port stopped exactly at the breakpoint;
* all eight PSIs report stopped and nothing moves afterwards;
* every completed item is in memory;
* steps of 3 and 1 pass exactly that many requests;
* after resuming, the consumer receives every item.

Across the two clock settings, the monitor count and the FIFO contents at each
breakpoint come out identical, although the breakpoints occur at different
times. That is the property the method promises. A last run, in the second
clock setting, uses the sequential breakpoint of the monitor section and checks
that tile 1 stops exactly 15 requests after the arm event reached it.

The bench also measures how much of the state differs between the two clock
settings. The state is all memories plus the eight monitor counters. It is
taken twice: once when stopped on the breakpoint, and once at the same time
after start, i.e. the time at which the first setting reached the breakpoint.
Stopping on the handshake must leave fewer differing bits. A typical run
gives:

| handshake | stopped on the handshake | sampled at the same time |
|-----------|--------------------------|--------------------------|
| 60        | 26                       | 41                       |
| 70        | 15                       | 52                       |
| 80        | 12                       | 48                       |
| 90        | 20                       | 60                       |
| 100       | 12                       | 67                       |

When stopped on the handshake, every memory word is identical. The bits that
still differ are handshake counts of the other ports: instruction fetches,
tile 3, and the memory tiles. These ports run at their own clocks' pace until
the stop reaches them. Sampled at the same time, the FIFO in the data memory
differs as well. Memories are not reset, so the bench makes one
unmeasured warm-up run first. Every measured run then starts from the same
leftover contents.

The bench also counts each mechanism and fails if one never occurred. The
mechanisms are:

* breakpoint events;
* stops through the event network;
* steps;
* arbitration conflicts;
* local memory accesses;
* TAP reads;
* sequential breakpoints.

A full run takes a few seconds.

## Parameters

| module       | parameter   | default | meaning |
|--------------|-------------|---------|---------|
| `csar_soc`   | `TCM_DEPTH` | 1024    | words per TCIM/TCDM |
| `csar_soc`   | `MEM_DEPTH` | 4096    | words per CMEM/DMEM |
| `monitor`    | `COUNT_W`   | 16      | handshake counter width |
| `noc`        | `NI`        | 6       | initiator ports |
| `edi`        | `N_SRC`, `N_DST` | 8, 5 | monitors, PSI clock domains |
| `tap_ctrl`   | `IDCODE`    | `32'h0C5A_1001` | device identification |

Address and data widths are package constants in `csar_pkg`. The tile address
decode assumes the 16-bit address.
