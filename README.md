# NNIP: an AXI wrapper for a real-time inferior-olive neuron simulator

A hardware simulator of the inferior olivary nucleus computes one
extended Hodgkin-Huxley step for each of its simulated cells every 50 µs,
which is the biological real-time budget. On its own, that simulator (the
*neuron network application*, NNA below) has only a bare pin interface:
- an initialisation port with a strobe/acknowledge handshake;
- an input port for injected signals;
- a streaming output port;
- a `cluster_rdy` status line;
- an `s_start` input that begins each step.

This design is the **Neuron Network IP-core (NNIP)**. It puts that
application behind two AXI4 slave ports, so that the ARM processor of a
Zynq-7000 device (a ZYBO board in the reference system) can do four things:
- initialise the network through ordinary register writes;
- let the hardware pace the steps at 50 µs intervals on its own;
- collect each step's 25 axon and 25 dendrite voltages from a memory
  window;
- follow progress through three event counters.

`nnip_system` is the complete programmable-logic side: the NNIP behind a
small AXI interconnect. The interconnect gives the processor's single AXI
master port both windows at their addresses in the reference system.
`nnip_top` is the IP on its own, with its two slave ports.

The neuron model itself is not part of this RTL. Its ports come out of both
`nnip_top` and `nnip_system` under the prefix `nna_`, so the application core connects one to
one. The testbenches use a behavioural stand-in, described under
[Verification](#verification).

```
 processor AXI4 master (32-bit addresses)
        |
 nnip_axi_interconnect   0x43C0_xxxx -> AXI4-Lite, 0x7AA0_xxxx -> AXI4-Full, else DECERR
        |                                               (nnip_system = interconnect + nnip_top)
                   +----------------------------- nnip_top ------------------------------+
 AXI4-Lite  ------>| nnip_axi_lite_slave   regs 0..9  --> nna_cluster_init_* / _in_*     |
 (64 KB window)    |                       regs 16..22 <-- NNA status (sampled)          |
                   |                       regs 24..26 <-- 3 x nnip_edge_counter         |
                   |                                                                     |
 AXI4-Full  ------>| nnip_axi_full_slave                                                 |
 (64 KB window)    |    +-- nnip_out_memory (64 KB) <-- nna_cluster_out_{new,type,adr,data}|
                   |    +-- nnip_start_gen  (50 us) --> nna_s_start, <-- nna_cluster_rdy |
                   |    +-- init-lock flag          --> init_locked                      |
                   +---------------------------------------------------------------------+
```

In the reference system the Lite port sits at 0x43C0_0000 and the Full port
at 0x7AA0_0000. Each occupies 64 KB on the processor's general-purpose AXI
master port 0. One clock `aclk` and one active-low reset `aresetn` serve
both ports and the application. The application receives the active-high
`nna_reset = !aresetn`.

## Files

| File | Contents |
|---|---|
| `rtl/nnip_pkg.sv` | Field widths, init/output type codes, AXI codes, register map |
| `rtl/nnip_system.sv` | System top: interconnect plus `nnip_top` |
| `rtl/nnip_axi_interconnect.sv` | Address decoder and AXI4-to-AXI4-Lite burst splitter |
| `rtl/nnip_top.sv` | Top level: wiring of the two slaves, counters and the `nna_*` ports |
| `rtl/nnip_axi_lite_slave.sv` | Register file |
| `rtl/nnip_axi_full_slave.sv` | Burst slave; instantiates the memory and the start generator |
| `rtl/nnip_out_memory.sv` | 64 KB two-port output memory |
| `rtl/nnip_start_gen.sv` | 50 µs step pacer |
| `rtl/nnip_edge_counter.sv` | Rising-edge counter |
| `tb/nna_model.sv` | Behavioural neuron network (testbench only) |
| `tb/tb_*.sv` | Self-checking testbenches, one per module |

## The register file (AXI4-Lite)

All registers are 32 bits wide. The byte offset of a register is four
times its index, and bits 7:2 of the address select the index. Unused
indices read as 0, and writes to them or to read-only registers are
ignored.

| Index | Offset | Access | Name | Drives / shows |
|---:|---:|---|---|---|
| 0 | 0x00 | RW | INIT_TYPE | `cluster_init_type[2:0]` |
| 1 | 0x04 | RW | INIT_CLUS | `cluster_init_clus[7:0]` |
| 2 | 0x08 | RW | INIT_ADR  | `cluster_init_adr[7:0]` (cell address) |
| 3 | 0x0C | RW | INIT_ADR2 | `cluster_init_adr2[7:0]` (parameter index) |
| 4 | 0x10 | RW | INIT_DATA | `cluster_init_data[31:0]` |
| 5 | 0x14 | RW | INIT_STR  | `cluster_init_str` (bit 0) |
| 6 | 0x18 | RW | IN_TYPE   | `cluster_in_type[1:0]` |
| 7 | 0x1C | RW | IN_ADR    | `cluster_in_adr[7:0]` |
| 8 | 0x20 | RW | IN_DATA   | `cluster_in_data[31:0]` |
| 9 | 0x24 | RW | IN_STR    | `cluster_in_str` (bit 0) |
| 16 | 0x40 | RO | INIT_ACK  | `cluster_init_ack` |
| 17 | 0x44 | RO | IN_ACK    | `cluster_in_ack` |
| 18 | 0x48 | RO | OUT_TYPE  | `cluster_out_type` |
| 19 | 0x4C | RO | OUT_ADR   | `cluster_out_adr` |
| 20 | 0x50 | RO | OUT_NEW   | `cluster_out_new` |
| 21 | 0x54 | RO | CLUSTER_RDY | `cluster_rdy` |
| 22 | 0x58 | RO | S_START   | `s_start` |
| 24 | 0x60 | RO | NUM_RDY   | rising edges of `cluster_rdy` since reset |
| 25 | 0x64 | RO | NUM_START | rising edges of `s_start` since reset |
| 26 | 0x68 | RO | NUM_OUTNEW | rising edges of `cluster_out_new` since reset |

The read/write registers drive the application directly: a written value
is on the `nna_` pins from the clock after the write. The read-only status
bits are sampled once per clock, so a read shows them one clock old.
`cluster_out_data` has no register because its words go to the memory.

Write strobes are honoured byte by byte. Reset clears every register.

## Initialising the network: the toggle handshake

The application takes its configuration as a series of *init vectors*. Each
vector has:
- a type (`INIT_TYPE`);
- a cluster number (`INIT_CLUS`);
- a cell address (`INIT_ADR`);
- a parameter index (`INIT_ADR2`);
- a 32-bit value (`INIT_DATA`).

Hand-over uses a two-phase (toggle) handshake, not a pulse:

1. Write the vector's fields.
2. Write `INIT_STR` with the *inverse* of its current value. A vector is
   pending as long as `INIT_STR != INIT_ACK`.
3. Poll `INIT_ACK` until it equals `INIT_STR`. The application has then
   taken the vector.

Because the handshake is level-based, register writes need no timing
relation to the application's clock. Reading a stale value is harmless.

The vector types are:

| Type | Meaning | Sent |
|---:|---|---|
| 0 | Cluster number | once per cluster |
| 1 | Dendrite voltage of one cell | once per cell |
| 2 | One of the 19 parameters of one cell (16 properties, 3 initial states) | 19 times per cell |
| 3 | Connectivity entry | as many as the network has |
| 4 | Init done: the application locks its configuration | once, last |
| 5–7 | Unused | – |

Types 0–3 may come in any order, but type 4 must be last. After reset the
application raises `cluster_rdy` to show it accepts init vectors. It drops
the line during initialisation and raises it again once locked.

Injected signals (`IN_*` registers) use the same toggle handshake on
`IN_STR` / `IN_ACK`. The meaning of `IN_TYPE` belongs to the application,
which uses injected signals to override a cell's response or to deliver
an impulse.

## Pacing the steps: the start generator and the init lock

`nnip_start_gen` issues `s_start`, a one-clock pulse. A start requires all
three of the following:
- **the period has run out.** A down-counter is reloaded with
  `PERIOD_CYCLES - 1` on every start. After reset it counts as already run
  out.
- **the generator is armed.** `init_locked` is set on the clock on which
  the application acknowledges a type-4 vector, i.e. when `cluster_init_ack`
  changes while `cluster_init_type` is 4. Only reset clears it.
- **the application is ready.** `cluster_rdy` is high.

This gives three cases:
- The first start follows the end of initialisation at once: about one
  clock after `cluster_rdy` rises with the lock.
- While each step finishes within the period, starts are exactly
  `PERIOD_CYCLES` clocks apart.
- A step that overruns delays the next start until `cluster_rdy` returns.
  The period then restarts from that late start. Lost time is never caught
  up with a burst of starts.

The arm flag matters because the application also raises `cluster_rdy`
right after reset, to invite init vectors. Without the lock, a start would
be issued in the middle of initialisation.

`PERIOD_CYCLES = 5000` gives 50 µs with a 100 MHz `aclk`. The reference
system's reset block is named for 100 MHz, but the clock frequency is not
stated outright. For a different clock, set
`PERIOD_CYCLES = 50 µs × f_aclk`.

## Where the results land: the output memory

For each step the application streams 50 words on `cluster_out_data`: a
dendrite and an axon voltage for each of the 25 cells. Each word comes with:
- a one-clock `cluster_out_new`;
- a cell address `cluster_out_adr`;
- a type `cluster_out_type`: `00` = dendrite, `01` = axon.

`nnip_out_memory` stores each word at word address `BASE(type) + adr`.
Other types are dropped.

| Data | Word address | Byte offset in the AXI-Full window |
|---|---|---|
| Axon voltage of cell *a* | `AXON_BASE + a` = *a* | 4*a* (0x000–0x060) |
| Dendrite voltage of cell *a* | `DEND_BASE + a` = 100 + *a* | 400 + 4*a* (0x190–0x1F0) |

Each step overwrites the previous one, so the memory always holds the
latest step. To keep a history, the host must copy the 200 bytes within
50 µs.

The memory has two ports:
- Port A is the application's write port.
- Port B serves the bus. It reads with one clock of latency and writes
  with byte strobes.

If both ports write the same word on one clock, the application's word
wins. The array is not reset. Read-back of never-written words gives
undefined data, so clear the region first if that matters.

## The AXI4-Full port

`nnip_axi_full_slave` serves one transaction at a time:
- Burst types: FIXED, INCR and WRAP.
- Lengths: 1–256 beats.
- Beat sizes: 1, 2 or 4 bytes (the address advances by 2^AxSIZE).
- Responses: always OKAY, returned with the request's ID (`ID_W` bits,
  default 1).
- Timing, write: the address is accepted in idle, then one beat per clock
  until `WLAST`, then the response.
- Timing, read: each beat takes two clocks, one to read the memory and one
  to present `RDATA`. An N-beat read therefore needs 2N clocks when
  `RREADY` stays high, and `RLAST` marks the final beat.
- Arbitration: if a read and a write address arrive on the same clock,
  the kind not served last goes first.

Assertions check two things: that `WLAST` agrees with the burst length,
and that `RVALID`/`RDATA` stay stable until taken.

## The AXI4-Lite port timing

- Write: `AWREADY` and `WREADY` rise together one clock after both
  `AWVALID` and `WVALID` are seen. The register is written on that
  handshake clock. `BVALID` follows on the next clock and holds until
  `BREADY`.
- Read: `ARREADY` pulses one clock after `ARVALID`. `RDATA`/`RVALID`
  follow one clock after the handshake and hold until `RREADY`.
- A new transfer is not accepted while its response is still pending.

## The activity counters

Three `nnip_edge_counter` instances count rising edges of `cluster_rdy`,
`s_start` and `cluster_out_new` from reset. They are 32 bits wide and wrap
around. They let the host confirm what happened without watching any
waveform.

After one complete step of the 25-cell configuration, `NUM_OUTNEW` has
advanced by 50 (0x32). `NUM_START` counts the starts issued.
`NUM_RDY` counts the following rising edges of `cluster_rdy`:
- the one after reset;
- the one at the lock;
- one at the end of every step.

## Reaching the IP from the processor: the interconnect

`nnip_axi_interconnect` decodes the upper 16 bits of each transaction's
start address:

| Address | Goes to | Notes |
|---|---|---|
| 0x43C0_0000–0x43C0_FFFF | AXI4-Lite register port | bursts split into single beats |
| 0x7AA0_0000–0x7AA0_FFFF | AXI4-Full memory port | passed through unchanged |
| anything else | built-in error slave | DECERR; write data dropped, read data zero |

A burst must stay inside its window. AXI bursts never cross 4 KB, so this
always holds. The write and read engines are independent, so a write and
a read can be in flight at the same time. Each engine serves one
transaction at a time.

- **Memory port.** The address is forwarded one clock after it is
  accepted, with its ID, length, size and burst type. W beats, the B
  response and R beats then pass straight through, handshakes included.
- **Register port.** AXI4-Lite carries one beat per transaction, so the
  engine issues one register access per beat. It computes each beat's
  address by the FIXED, INCR or WRAP rule and waits for that beat's
  response before the next beat. A write burst returns a single B that
  carries the worst response of its beats. A read burst returns each beat
  as it arrives, with the request's ID and with `RLAST` on the last beat.
  The register slave always answers OKAY, but the merge also works for
  slaves that can return errors.

In the reference system this role is filled by the vendor's configurable
interconnect. The version here is deliberately minimal:
- no pipelining of outstanding transactions;
- no data-width or clock-domain conversion.

`ID_W` defaults to 12, the ID width of the Zynq-7000 general-purpose
ports.

## Departures from the source description, and assumptions

The design follows a published description of this IP. That description
gives the block structure, the two address windows and the 64 KB memory.
It also gives the 32-bit register width with byte strobes and the AXI
handshake conditions for register write and read enable. Finally, it
gives the init types, the toggle handshake, the out-type codes, the +100
word offset and the three counters. The points below are where this RTL
had to choose, or departs:

- **Axon vs dendrite placement.** The source is inconsistent here. Its
  code writes type `00` words (dendrite) at the base and everything else
  at +100. Its printed results show axon voltages at byte 0–96 and
  dendrite voltages at 400+. This RTL follows the printed results. Swap
  `AXON_BASE`/`DEND_BASE` on `nnip_axi_full_slave` to get the other
  reading.
- **Register numbering and field widths** are this design's own. The
  source lists the registers' purpose but not their indices. It also
  leaves the widths of `init_clus`, `init_adr`, `init_adr2`, `in_type` and
  `out_adr` unspecified; 8/8/8/2/8 bits are used here.
- **Clock frequency.** The 100 MHz that sets `PERIOD_CYCLES = 5000` is
  inferred, as described above.
- **Start generator.** The source says only that it makes a 50 µs period
  from the ready signal. The arm input and the "late step delays the next
  start" rule are choices made here.
- **Counter values.** The source expects the `cluster_rdy` and `s_start`
  counts to be 2 after one step, yet prints `0xFFFFFFF2` for both. Those
  values are not reproduced. The counters here simply count rising edges
  from reset.
- **Memory size against resources.** The text gives a 64 KB memory, which
  needs 16 RAMB36 blocks (of 60 on the xc7z010). The source's resource
  table, however, shows 2 block RAMs for the IP without the application,
  so its built memory was smaller than its window. This RTL implements the
  full 64 KB.
- **Bus writes to the memory** are allowed here. The source's memory is
  written by the application, and the host only reads it.
- **One clock domain.** The application runs on `aclk`, as in the
  reference system.

## Not included

- **The neuron network application.** This covers its cluster, physical
  cells, exponent coprocessor, router tree and I/O bridges. The core was
  produced by high-level synthesis from earlier work, and its description
  here goes no further than its ports and protocol.
- **The Zynq processing system and the reset block.** These are vendor
  IP. `nnip_system` exposes the AXI master-side port, the clock and the
  reset to which they connect. The vendor interconnect is replaced by the
  minimal one described above.
- **Software.** The host program that initialises the network and prints
  the results is not included. `tb_nnip_system` performs the same sequence through the processor's
  port.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`, and each has
a watchdog.

| Testbench | What it does | Checks |
|---|---|---:|
| `tb_nnip_system` | The same flow as `tb_nnip_top`, but through the processor's single AXI4 port at the real addresses (0x43C0_xxxx, 0x7AA0_xxxx) with random 12-bit IDs. It adds DECERR on an unmapped address (write and read bursts), and INCR and WRAP bursts into the register window. | about 9 640 |
| `tb_nnip_axi_interconnect` | 300 random transactions to the register window, the memory window and unmapped addresses, against two slave models with random ready timing. The register model answers SLVERR for words 32–63. It checks forwarded fields and beats, the split register beats, the merged write responses, DECERR and ID echo, and runs writes and reads concurrently. | 9972 |
| `tb_nnip_top` | The whole IP at its default parameters (5000-clock period, 64 KB memory) with `nna_model` attached. It exercises all three burst types, byte strobes and a simultaneous read and write. It sends all five init types (1 + 25 + 475 + 50 + 1 vectors) and runs four steps, one of them longer than the period. It injects a signal between steps, reads back all 50 words after two steps and compares the counters. Each mechanism is counted and must occur. | 4054 |
| `tb_nnip_axi_full_slave` | 150 random bursts (type, length, 1/2/4-byte beats, strobes, gaps, back-pressure) against a reference memory. Also application writes, the lock and the starts, at `ID_W = 2`. | 13350 |
| `tb_nnip_axi_lite_slave` | Random writes with strobes, both valid orders, slow `BREADY`/`RREADY`, read-only and unused indices | 1964 |
| `tb_nnip_out_memory` | Both ports against an associative model over the full 64 KB, including the same-word collision | 165 |
| `tb_nnip_start_gen` | No start before arm, immediate first start, on-time and late starts | 61 |
| `tb_nnip_edge_counter` | Random input, reset mid-run, wrap-around of a 4-bit instance | 403 |

The testbench model of the application, `tb/nna_model.sv`, keeps only the
application's protocol:
- It stores init vectors and locks on type 4.
- It drops and raises `cluster_rdy` as described above.
- After each `s_start` it waits a programmable time, then streams one
  dendrite word and one axon word per cell. The dendrite word is the
  initial or injected value, and the axon word is parameter 15 plus the
  step number.

So the tests show that the wrapper moves every value to the right place at
the right time. They say nothing about the neuron equations.

## Simulating

With Verilator 5 (`--timing` is needed for the testbenches' delays), from
the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/nnip_pkg.sv tb/tb_nnip_system.sv --top-module tb_nnip_system
./obj_dir/Vtb_nnip_system
```

The same command with another testbench name runs that testbench. The
system test simulates about 40 000 clocks and finishes in well under
a second. To change the step period for experiments, set `PERIOD_CYCLES`
on `nnip_system` or `nnip_top`. The end-to-end testbenches read their own
`PERIOD` localparam, which must match.
