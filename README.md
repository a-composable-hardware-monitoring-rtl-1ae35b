# Composable hardware monitor for a processor + coprocessor system

A heterogeneous system, a processor that hands work to a reconfigurable
coprocessor, is hard to observe from software: bus traffic, how long a
computation takes and what happens inside the datapath are all invisible
to the program. This RTL adds a small hardware monitor next to the system.
It watches probe signals and turns them into counts and durations. The
processor reads the results over an AXI4-Lite port, or an interrupt tells
it that a result has crossed a threshold.

The design's main idea is to build every monitor from the same few parts,
so that a new thing to observe needs only a new front end:

```
 probes ──► EIG ──event instance──► DCAPF ──monitoring info──► LMIC registers ──► DCI (AXI4-Lite) ──► host
           (bus-specific)           (generic: filter, count or time,      ▲                   │
                                     Catch / Wack)                        └── control, init ──┘
```

* An **Event Instance Generator (EIG)** is the only part that knows the
  monitored signals. It turns them into a uniform *event instance*
  `{good, inc, data}`. `data` is the value to judge, for example a burst
  address or a VAL the processor wrote. `inc` is the weight to add, for
  example the bytes in a burst.
* A **DCAPF** (data capture, processing and filtering unit) turns event
  instances into one metric. The metric is an event count or a time spent
  inside a range of values. Both can be limited to a window `[INF, SUP]`
  that the host programs.
* A **sniffer** is one EIG plus one or more DCAPFs plus a **dispenser**. The
  dispenser hands each DCAPF its control bits and initial values.
* The **LMIC** (local monitoring information collector) holds the control,
  initialisation and result registers of its sniffers.
* The **DCI** (data collector interface) puts those registers and the
  timestamp memory on the host's AXI4-Lite bus.

## The top: four sniffers on one LMIC

`hw_monitor_top` is the evaluated configuration. It has four sniffers,
one LMIC and sixteen 32-bit registers.

| # | sniffer | EIG input | DCAPFs | result |
|---|---------|-----------|--------|--------|
| 0 | transaction | AW (or AR) channel of the coprocessor's AXI4 slave port | 1 event monitor with filter and catcher | bytes of the bursts whose address lies in `[INF, SUP]`; 23-bit counter |
| 1 | task | start and done lines of the coprocessor | 1 time monitor with time capture | cycles between start and done; 53-bit counter |
| 2 | operation | `N_OP_EV` event lines from the coprocessor's datapath | one event monitor per line | occurrences per line; `OP_CNT_W`-bit counters |
| 3 | processor | writes on the monitor's own AXI4-Lite port | an event monitor (filter, catcher, acknowledger) and a free-running time monitor | number of timestamps taken, and the time base |

**Timestamps.** The processor takes a timestamp by writing a value VAL to
register 10. If VAL lies in the processor sniffer's `[INF, SUP]` window, the
record count goes up. The top then writes `{VAL, TIMESTAMP}` into the
timestamp memory, at entry `count-1`. TIMESTAMP is the time base, which
counts clock cycles while the sniffer runs. One bus write is all the
software does, with no read-modify-write and no timer access.

### Register map (byte address = 4 × index)

| index | register | access |
|------:|----------|--------|
| 0 | control: bit 0 run, bit 1 soft reset, bits 2+2i..3+2i PROG of sniffer i | R/W |
| 1–4 | initialisation register of sniffer 0–3 | R/W |
| 5 | transaction bytes (bits 22:0) | R |
| 6, 7 | task cycles, low 32 and high 21 bits | R |
| 8 | operation counts: event k at bits 10k+9..10k | R |
| 9 | timestamps recorded | R |
| 10 | time base (read); write VAL here to take a timestamp | R/W |
| 11 | Wack of every DCAPF, bit k = DCAPF k in the order 5,6,8a,8b,9,10 | R |
| 12 | interrupt pending, one bit per DCAPF; write 1 to clear | R/W1C |
| 13 | interrupt enable, one bit per DCAPF | R/W |
| 14 | interrupt threshold, shared by all sources; resets to all ones | R/W |
| 15 | DCI master status: bit 0 copy busy, bit 1 error response seen, bit 2 copy complete | R |

The timestamp memory starts at byte address `0x2000`. Record j holds
TIMESTAMP at `0x2000 + 8j` and VAL at `0x2000 + 8j + 4`.

If `N_OP_EV × OP_CNT_W > 32`, every operation event gets its own register.
All registers from index 9 up then shift by `N_OP_EV - 1`, and the register
space grows to the next power of two. The top computes this map from its
parameters and passes it to the LMIC as three packed tables: register,
first bit and width of each DCAPF's result.

## Programming a measurement

Each sniffer has a 2-bit PROG field:

| PROG | mode | what the sniffer does |
|------|------|------------------------|
| 00 | IDLE | ignores run and soft reset; its DCAPFs are disabled and keep their results |
| 01 | INIT | writes to its initialisation register load the DCAPF limits |
| 10 | FILTERING | counts when run = 1, using the `[INF, SUP]` windows |
| 11 | NO-FILTERING | counts when run = 1, ignoring the windows |

A session:

1. Write the control register with the sniffers to set up in INIT. Then
   write each one's initialisation register 2 × (number of DCAPFs) times,
   in this order: INF of DCAPF 0, SUP of DCAPF 0, INF of DCAPF 1, and so on.
   The dispenser counts these writes. Its count restarts whenever the
   sniffer leaves INIT, so the sequence is always aligned. The limits reset
   to `[0, all ones]`.
2. Write the control register with run = 1 and each sniffer in FILTERING,
   NO-FILTERING or IDLE.
3. Clear run. The counters freeze. Wack (register 11) shows which results
   are final: an event monitor with an acknowledger raises Wack once it has
   run and been stopped.
4. Read the result registers. Optionally pulse soft reset (set bit 1, then
   clear it): every sniffer that is not IDLE clears its counters and its
   record count.

An enabled result that rises above the threshold sets its pending bit and
raises `irq`. A result that stays above the threshold does not set the bit
again; the result must first drop to the threshold or below.

## Results pushed to memory: the DCI master side

Built with `DCI_MASTER = 1`, the DCI also copies the results out by
itself. Four cycles after the host clears run, the last results have
reached their registers. The DCI then reads registers 5 through Wack
(5–11 at the defaults) one by one. It writes each one with an AXI4-Lite
single write to `M_BASE + 4 × index`, so the memory holds a mirror of the
register map. The slave and master sides share one register read port.
In the cycle the slave accepts a read address, the slave wins and the
master waits. Register 15 shows progress. A response other than OKAY sets
the error bit, which stays set until the next copy starts. With the
default `DCI_MASTER = 0`, the evaluated arrangement, the host reads
everything itself and the `m_*` port stays idle.

## Reading at the host's own speed: the clock-domain bridge

Built with `HOST_ASYNC = 1`, the host port `s_*` and `irq` run on
`host_clk` (reset `host_rst_n`), while sniffers, LMIC and DCI stay on
`clk`. The two clocks may be unrelated, so the coprocessor side is
sampled at its own rate and the host reads whenever it likes.

The bridge (`axil_cdc`) handles one transaction at a time. The host side
accepts a write (AW and W together) or a read, holds the address, data and
strobes, and flips a request bit. The monitor side sees that bit through
two flip-flops, replays the access on the DCI, keeps the response, and
flips an acknowledge bit back through two more flip-flops. The held values
never change while a flip is in flight, so they cross safely without
synchronisers of their own. A round trip costs about three cycles of each
clock on top of the DCI's own latency. `irq` crosses through two
flip-flops. The timestamp sniffer watches the bus after the bridge, so a
timestamp is taken on `clk`. Assert both resets together. With the default
`HOST_ASYNC = 0` the bridge is left out and `host_clk` and `host_rst_n`
are unused.

## Inside a DCAPF

A DCAPF is put together at elaboration time from optional parts, chosen by
configuration bits:

* **Init DCAPF**: holds INF and SUP.
* **Data gating** (optional): registers the event instance and drops it
  while the DCAPF is disabled. It adds one cycle.
* **Event monitor** (optional): filter → event capture → counter. While
  enabled, a good event whose data lies in `[INF, SUP]` (inclusive; the
  filter is bypassed in NO-FILTERING mode) adds `inc` to the counter.
  Optional catcher and acknowledger.
* **Time monitor** (optional): filter → time capture → counter. Each good
  event reports a new value of the watched quantity. The monitor counts the
  cycles during which the last reported value was in range. In
  NO-FILTERING mode, "in range" means non-zero. The task sniffer reports 1
  at start and 0 at done, so it measures the cycles between the two. With
  no time capture built, the counter counts every enabled cycle: a time
  base.
* **Aggregator**: forms the monitoring information
  `{Wack, Catch, attribute, metric ID, sniffer ID, result}`. With both
  monitors present, the result is `{time[31:0], count[31:0]}`, Catch is
  the OR and Wack the AND of theirs. The attribute is the data of the last
  good event.

**Catch** tells the LMIC to copy the result into its register. With a
catcher, Catch pulses in the cycle after the count changed. Without one,
Catch is always high and the register follows the counter. **Wack** tells
the host the copied value is final.

Counters **saturate** at their maximum instead of wrapping. A counter that
reads all ones has therefore overflowed.

## Timing

Everything runs on one clock `clk`, with an active-low asynchronous reset
`rst_n`, unless `HOST_ASYNC = 1` (see above). The figures below are
cycles of `clk`, seen at the DCI.

* An EIG registers its event instance: one cycle after the probe activity.
* A counter updates at the next edge. Catch follows one cycle later, and
  the LMIC register one cycle after that. From probe activity to a new
  register value is about three cycles (four with data gating). After
  stopping a run, wait a few cycles before reading results.
* A task from the start edge to the done edge of N cycles reads as N.
* Two timestamps taken N cycles apart differ by N.
* AXI4-Lite: a write is accepted when AWVALID and WVALID are both high and
  no response is pending; BVALID follows one cycle later. A read returns
  RVALID one cycle after the address handshake for a register and two
  cycles after it for the timestamp memory. BRESP and RRESP are always
  OKAY. WSTRB is ignored, so every write is a full 32-bit write.

## How far it follows the published system

These follow the published system:

* the split into EIG, DCAPF, dispenser, sniffer, LMIC, DCI and interrupt
  controller;
* the parts of a DCAPF and their configuration bits (from the LSB: data
  gating, time monitor, event monitor; for the monitors: filter, capture,
  catcher, acknowledger);
* the event instance and monitoring information fields;
* the control register layout and the PROG codes;
* INF and SUP included in the range;
* the four sniffers and their counter sizes;
* sixteen 32-bit registers.

The published text gives a 23-bit transaction counter in one place and a
32-bit one in another; this design uses 23 bits (`TRANS_CNT_W`).

This design's own choices, where the description is silent:

* the exact register assignment and the Wack and interrupt registers;
* saturation instead of wrap-around;
* the cycle timing of Catch and Wack;
* the order of initialisation writes;
* the interrupt controller's single shared threshold and rising-edge
  detection;
* the timestamp location (register 10) and record layout;
* the 1024-entry timestamp memory;
* "non-zero" as the range in NO-FILTERING time monitoring.

Departures and omissions:

* **Clock domains.** The published system lets collection and retrieval
  run at different speeds but does not say how the crossing is made. Here
  sniffers, LMIC and DCI share `clk`; the optional bridge moves only the
  host port to its own clock, and it is off by default. The bridge design
  is this design's own.
* **DCI master side.** Only the idea (results written to memory by the
  monitor) is published. The trigger, the copied range, the mirror layout
  and the status register are this design's own.
* **One LMIC.** The LMIC is parameterised, but the top has a single one.
* The processor, the coprocessor, the memory and the interconnect are not
  part of this RTL. The top brings out their probe signals as ports.

## Sizes the design holds

At its defaults the top holds every configuration of the Selective
Accumulations study except one, including the full one: transaction, task
and two 10-bit operation events in one register. The exception is three
20-bit operation events. That needs `N_OP_EV = 3, OP_CNT_W = 20`, and the
map then grows to three operation registers. The 1024-entry timestamp
memory holds 256 timestamps, one per coprocessor call, four times over.

## Top-level parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 14 | AXI4-Lite address width (register space below `0x2000`, memory above) |
| `COP_ADDR_W` | 32 | address width of the watched coprocessor port |
| `TRANS_DIR` | 0 | 0: watch write bursts, 1: read bursts |
| `TRANS_CNT_W` | 23 | transaction byte counter |
| `TASK_CNT_W` | 53 | task cycle counter (two registers) |
| `N_OP_EV` | 2 | operation events |
| `OP_CNT_W` | 10 | bits per operation counter |
| `TS_DEPTH` | 1024 | timestamp records |
| `DCI_MASTER` | 0 | 1: copy the results to memory after every run |
| `M_ADDR_W`, `M_BASE` | 32, 0 | master address width and base address |
| `HOST_ASYNC` | 0 | 1: host port and `irq` on `host_clk`, through the bridge |

## Files

`rtl/mon_pkg.sv` holds the shared types (event instance, monitoring
information, DCAPF control bundle, PROG encoding) and widths. Every other
file in `rtl/` is one module, named after its file, and begins with a
description of its interface and timing. Bottom up:

* `range_filter`, `mon_counter`, `init_dcapf`, `data_gating`;
* `event_monitor`, `time_monitor`, `aggregator`, `dcapf`;
* `dispenser`, `sniffer`;
* `eig_axi_burst`, `eig_task`, `eig_opevents`, `eig_axil_ts`;
* `lmic`, `interrupt_ctrl`, `tst_mem`, `dci_axil`, `dci_axil_master`,
  `axil_cdc`;
* `hw_monitor_top`.

`tb/tb_<module>.sv` is a self-checking testbench for each module. Each
prints `TB_RESULT checks=N failures=M` and stops itself if it hangs.
`tb/tb_hw_monitor_top.sv` runs a complete session on the top at its
default size:

* INIT, then FILTERING and NO-FILTERING runs;
* filtered bursts;
* a timed task;
* operation events;
* timestamps read back from memory;
* Wack;
* both counter saturations;
* the interrupt and its clear;
* IDLE;
* soft reset;
* write-response back pressure.

It counts how often each of these happened and fails if one never did.

Four more system-level testbenches use the top:

* `tb_workload_y5` builds it with three 20-bit operation counters, each in
  its own register.
* `tb_workload_d4b256` takes 256 timestamps, one per simulated coprocessor
  call, and reads all of them back.
* `tb_top_dci_master` checks the master side against a memory model.
* `tb_top_async` runs the host on a 14-unit clock against a 10-unit
  monitor clock, through the bridge.

They share the host bus tasks in `tb/tb_axil_host.svh`.

To simulate one of them:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl +libext+.sv \
    rtl/mon_pkg.sv tb/tb_hw_monitor_top.sv --top-module tb_hw_monitor_top \
    --Mdir obj -o sim
./obj/sim
```
